// tb_cordic_sincos: compares the CORDIC cos/sin outputs with real-valued cos/sin for the four
// quadrant boundaries and random angles over the full turn; the tolerance is 12 LSB of 32767.
// It also checks the one-clock latency of out_valid.
module tb_cordic_sincos;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, in_valid, out_valid;
  logic signed [15:0] angle, cos_o, sin_o;
  int checks = 0, failures = 0;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  cordic_sincos dut (.*);

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real a, ec, es;
    rst = 1; in_valid = 0; angle = 0;
    @(posedge clk); #1 rst = 0;
    for (int n = 0; n < 2000; n++) begin
      case (n)
        0: angle = 0;
        1: angle = 16'sd16384;
        2: angle = -16'sd16384;
        3: angle = -16'sd32768;
        4: angle = 16'sd16383;
        default: angle = 16'($urandom);
      endcase
      in_valid = 1;
      @(posedge clk); #1;
      in_valid = 0;
      checks++;
      if (!out_valid) failures++;
      a  = real'(angle) * 3.14159265358979 / 32768.0;
      ec = 32767.0 * $cos(a);
      es = 32767.0 * $sin(a);
      checks++;
      if (rabs(real'(cos_o) - ec) > 12.0 || rabs(real'(sin_o) - es) > 12.0) begin
        failures++;
        if (failures < 6) $display("angle %0d: got %0d %0d want %f %f", angle, cos_o, sin_o, ec, es);
      end
      @(posedge clk); #1;
      checks++;
      if (out_valid) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
