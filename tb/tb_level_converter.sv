// tb_level_converter: drives random bits with random symbol strobes and checks that the output
// takes +32767 / -32767 one clock after each strobe and holds it until the next; Q is 0 in BPSK.
module tb_level_converter;
  import modem_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, sym_strobe, bit_i, bit_q, out_strobe;
  psk_mode_e mode;
  iq_t nrz;
  int checks = 0, failures = 0;

  level_converter dut (.*);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    iq_t expct;
    rst = 1; sym_strobe = 0; bit_i = 0; bit_q = 0; mode = MODE_QPSK;
    @(posedge clk); #1 rst = 0;
    expct = '0;
    for (int n = 0; n < 4000; n++) begin
      if (n == 2000) mode = MODE_BPSK;
      sym_strobe = ($urandom % 5) == 0;
      bit_i = $urandom; bit_q = $urandom;
      @(posedge clk); #1;
      if (sym_strobe) begin
        expct.i = bit_i ? 16'sd32767 : -16'sd32767;
        expct.q = (mode == MODE_QPSK) ? (bit_q ? 16'sd32767 : -16'sd32767) : 16'sd0;
      end
      checks++;
      if (nrz !== expct || out_strobe !== sym_strobe) begin
        failures++;
        if (failures < 5) $display("n %0d got %0d %0d want %0d %0d", n, nrz.i, nrz.q, expct.i, expct.q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
