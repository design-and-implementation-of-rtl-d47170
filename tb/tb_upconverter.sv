// tb_upconverter: with the carrier at f_clk/4 the local oscillator steps through 0, 90, 180 and
// 270 degrees, so for constant I and Q the output must cycle through I/2, -Q/2, -I/2, Q/2
// (s = (I*cos - Q*sin)/2, tolerance 2 LSB). A second run at an arbitrary frequency compares the
// output against I*cos - Q*sin of an independently accumulated phase.
module tb_upconverter;
  import modem_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, out_valid;
  logic [31:0] freq_word;
  iq_t din;
  sample_t dout;
  int checks = 0, failures = 0;

  upconverter dut (.*);

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real e, ang;
    logic [31:0] acc;
    din.i = 16'sd20000; din.q = -16'sd12000;
    freq_word = 32'h4000_0000;
    rst = 1; @(posedge clk); #1 rst = 0;
    @(posedge clk); #1;   // DDS output valid
    @(posedge clk); #1;   // first product registered: acc was 0 -> cos = 1
    for (int n = 0; n < 64; n++) begin
      case (n % 4)
        0: e = 10000.0;
        1: e = 6000.0;
        2: e = -10000.0;
        default: e = -6000.0;
      endcase
      checks++;
      if (rabs(real'(dout) - e) > 2.0 || !out_valid) begin
        failures++;
        if (failures < 5) $display("n %0d got %0d want %f", n, dout, e);
      end
      @(posedge clk); #1;
    end
    // arbitrary frequency, random constant symbols changing every 37 clocks
    freq_word = 32'd178956971;
    rst = 1; @(posedge clk); #1 rst = 0;
    @(posedge clk); #1;
    acc = 0;
    for (int n = 0; n < 3000; n++) begin
      if (n % 37 == 0) begin din.i = 16'($urandom); din.q = 16'($urandom); end
      // product seen at the next edge uses din now and the DDS output of acc one step back
      ang = real'(acc[31:16]) * 2.0 * 3.14159265358979 / 65536.0;
      e = (real'(din.i) * 32767.0 * $cos(ang) - real'(din.q) * 32767.0 * $sin(ang)) / 65536.0;
      @(posedge clk); #1;
      acc = acc + freq_word;
      checks++;
      if (rabs(real'(dout) - e) > 10.0) begin
        failures++;
        if (failures < 8) $display("f n %0d got %0d want %f", n, dout, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
