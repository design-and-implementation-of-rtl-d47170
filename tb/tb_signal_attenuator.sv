// tb_signal_attenuator: random samples and shifts from -15 to +15; the registered output must
// equal the sample times 2^shift, rounded toward minus infinity and saturated to 16 bits.
module tb_signal_attenuator;
  import modem_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, in_valid, out_valid;
  logic signed [4:0] shift;
  sample_t din, dout;
  int checks = 0, failures = 0;

  signal_attenuator dut (.*);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint v;
    rst = 1; in_valid = 0; shift = 0; din = 0;
    @(posedge clk); #1 rst = 0;
    for (int n = 0; n < 3000; n++) begin
      din = 16'($urandom);
      if (n % 3 == 0) din = din >>> ($urandom % 12);
      shift = 5'(int'($urandom % 31) - 15);
      in_valid = 1;
      @(posedge clk); #1;
      if (shift >= 0) v = longint'(din) * (longint'(1) << shift);
      else            v = longint'(din) >>> (-shift);
      if (v > 32767) v = 32767;
      if (v < -32768) v = -32768;
      checks++;
      if (dout !== 16'(v) || !out_valid) begin
        failures++;
        if (failures < 5) $display("%0d << %0d: got %0d want %0d", din, shift, dout, v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
