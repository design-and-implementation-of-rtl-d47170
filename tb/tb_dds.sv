// tb_dds: runs the DDS with several frequency words and phase offsets and compares every output
// sample with cos/sin of a phase accumulated independently in the testbench (output one clock
// after the accumulator value it shows, tolerance 16 LSB). It also counts positive-going zero
// crossings of the sine over 20000 clocks against freq_word * 20000 / 2^32.
module tb_dds;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst;
  logic [31:0] freq_word;
  logic signed [15:0] phase_off;
  logic out_valid;
  logic signed [15:0] cos_o, sin_o;
  int checks = 0, failures = 0;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  dds dut (.*);

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [31:0] fw, input logic signed [15:0] ph);
    logic [31:0] acc;
    real ang, exp_c, exp_s;
    int zc;
    logic signed [15:0] s_d;
    freq_word = fw; phase_off = ph;
    rst = 1; @(posedge clk); #1; rst = 0;
    acc = 0;
    zc = 0;
    s_d = 0;
    for (int n = 0; n < 20000; n++) begin
      // acc now holds the value the CORDIC sees this cycle; the output shows it next cycle
      ang = (real'(acc[31:16]) + real'(ph)) * 2.0 * 3.14159265358979 / 65536.0;
      exp_c = 32767.0 * $cos(ang);
      exp_s = 32767.0 * $sin(ang);
      @(posedge clk); #1;
      acc = acc + fw;
      checks++;
      if (!out_valid || rabs(real'(cos_o) - exp_c) > 16.0 || rabs(real'(sin_o) - exp_s) > 16.0) begin
        failures++;
        if (failures < 6) $display("n %0d got %0d %0d want %f %f", n, cos_o, sin_o, exp_c, exp_s);
      end
      if (s_d < 0 && sin_o >= 0) zc++;
      s_d = sin_o;
    end
    checks++;
    if (rabs(real'(zc) - real'(fw) * 20000.0 / 4294967296.0) > 1.5) begin
      failures++;
      $display("zero crossings %0d for word %0d", zc, fw);
    end
  endtask

  initial begin
    run(32'd178956971, 16'sd0);        // 5 MHz at 120 MHz
    run(32'd1073741824, 16'sd8192);    // f_clk/4, +45 degrees
    run(32'd715827883, -16'sd20000);   // 20 MHz
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
