// tb_data_generator: checks the symbol rate set by the DDS word (strobes counted over 48000
// clocks against freq_word * 48000 / 2^32), and compares the I and Q bit streams with two
// independent models of the seeded LFSRs stepped on each strobe. In BPSK the Q stream must stay 0.
module tb_data_generator;
  import modem_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst;
  psk_mode_e mode;
  logic [31:0] freq_word;
  logic signed [15:0] phase_off;
  logic [9:0] seed_i, seed_q;
  logic bit_i, bit_q, sym_strobe;
  int checks = 0, failures = 0;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  data_generator dut (.*);

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [9:0] nxt(input logic [9:0] s);
    return {s[8:0], s[9] ^ s[6]};
  endfunction

  task automatic run(input psk_mode_e m, input logic [31:0] fw);
    logic [9:0] mi, mq;
    int nstr;
    real expct;
    mode = m; freq_word = fw; phase_off = 0;
    seed_i = 10'h2A5; seed_q = 10'h13C;
    rst = 1; @(posedge clk); #1; rst = 0;
    mi = seed_i; mq = seed_q;
    nstr = 0;
    for (int n = 0; n < 48000; n++) begin
      @(posedge clk); #1;
      if (sym_strobe) begin
        nstr++;
        mi = nxt(mi); mq = nxt(mq);
        checks++;
        if (bit_i !== mi[0] || bit_q !== ((m == MODE_QPSK) ? mq[0] : 1'b0)) begin
          failures++;
          if (failures < 5) $display("bits %b%b want %b%b", bit_i, bit_q, mi[0], mq[0]);
        end
      end
    end
    expct = real'(fw) * 48000.0 / 4294967296.0;
    checks++;
    if (rabs(real'(nstr) - expct) > 1.5) begin
      failures++;
      $display("strobes %0d expected %f", nstr, expct);
    end
  endtask

  initial begin
    run(MODE_QPSK, 32'd178956971);   // 5 Msym/s at 120 MHz
    run(MODE_BPSK, 32'd35791394);    // 1 Msym/s
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
