// tb_symbol_decider: random symbols and strobes; one clock after each strobe `bits` must hold the
// zero-threshold decisions {I > 0, Q > 0}, and the serial port must give the I bit at once and,
// in QPSK only, the Q bit on the following clock.
module tb_symbol_decider;
  import modem_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, sym_strobe, bits_valid, ser_bit, ser_valid;
  psk_mode_e mode;
  iq_t symbol;
  logic [1:0] bits;
  int checks = 0, failures = 0;

  symbol_decider dut (.*);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ei, eq;
    rst = 1; sym_strobe = 0; symbol = '0; mode = MODE_QPSK;
    @(posedge clk); #1 rst = 0;
    for (int n = 0; n < 1000; n++) begin
      mode = psk_mode_e'(n / 500);
      symbol = iq_t'($urandom);
      if (n % 7 == 0) symbol.i = 0;
      ei = symbol.i > 0; eq = symbol.q > 0;
      sym_strobe = 1;
      @(posedge clk); #1;
      sym_strobe = 0;
      checks++;
      if (!bits_valid || bits !== {ei, eq} || !ser_valid || ser_bit !== ei) begin
        failures++;
        if (failures < 5) $display("bits %b want %b%b", bits, ei, eq);
      end
      @(posedge clk); #1;
      checks++;
      if (mode == MODE_QPSK ? (!ser_valid || ser_bit !== eq) : ser_valid) failures++;
      repeat ($urandom % 3) @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
