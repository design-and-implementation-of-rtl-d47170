// tb_phase_shifter: random samples and phases (Q3.13 radians within [-pi, pi]); two clocks later
// the output must equal x * exp(j*theta) computed with real arithmetic, within 12 LSB, and
// out_valid must follow in_valid by two clocks.
module tb_phase_shifter;
  import modem_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, in_valid, out_valid;
  iq_t din, dout;
  phase_t theta;
  int checks = 0, failures = 0;

  phase_shifter dut (.*);

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real a, ei, eq;
    rst = 1; in_valid = 0; din = '0; theta = 0;
    @(posedge clk); #1 rst = 0;
    for (int n = 0; n < 2000; n++) begin
      din.i = 16'(int'($urandom % 40000) - 20000);
      din.q = 16'(int'($urandom % 40000) - 20000);
      theta = 16'(int'($urandom % 51470) - 25735);
      in_valid = 1;
      @(posedge clk); #1;
      in_valid = 0;
      checks++;
      if (out_valid) failures++;
      @(posedge clk); #1;
      a = real'(theta) / 8192.0;
      ei = real'(din.i) * $cos(a) - real'(din.q) * $sin(a);
      eq = real'(din.i) * $sin(a) + real'(din.q) * $cos(a);
      checks++;
      if (!out_valid || rabs(real'(dout.i) - ei) > 12.0 || rabs(real'(dout.q) - eq) > 12.0) begin
        failures++;
        if (failures < 6) $display("th %0d got %0d %0d want %f %f", theta, dout.i, dout.q, ei, eq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
