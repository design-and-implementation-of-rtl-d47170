// tb_agc: closes the AGC loop around a behavioural gain stage, y = x * gain / 256, fed by a sine.
// With an input of RMS 2000 and a desired level of 5000 the gain must rise until the measured
// level is within +-3*delta_l of the target; then the input steps up to RMS 12000 and the gain
// must fall back into the same band. The fall must take fewer samples than the rise, because
// the gain for a too strong signal (g2) is the larger one.
module tb_agc;
  import modem_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, in_valid;
  sample_t din;
  logic [15:0] desired_level, delta_l, gain, level;
  logic [4:0] s1, s2, avg_shift;
  logic signed [16:0] err;
  int checks = 0, failures = 0;

  agc dut (.*);

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real amp;
  longint t = 0;
  always @(posedge clk) begin
    real y;
    y = amp * $sin(2.0 * 3.14159265358979 * real'(t) / 37.3) * real'(gain) / 256.0;
    if (y > 32767.0) y = 32767.0;
    if (y < -32768.0) y = -32768.0;
    din <= 16'(int'(y));
    t <= t + 1;
  end

  task automatic settle(input int maxn, output int when);
    int inband;
    inband = 0;
    when = -1;
    for (int n = 0; n < maxn; n++) begin
      @(posedge clk); #1;
      if (int'(level) > 5000 - 600 && int'(level) < 5000 + 600) inband++;
      else inband = 0;
      if (inband == 2000) begin when = n - 2000; return; end
    end
  endtask

  initial begin
    int t_up, t_dn;
    rst = 1; in_valid = 1;
    desired_level = 16'd5000; delta_l = 16'd200;
    s1 = 5'd14; s2 = 5'd10; avg_shift = 5'd6;
    amp = 2000.0 * 1.41421356;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    settle(400000, t_up);
    $display("rise settled after %0d samples, gain %0d", t_up, gain);
    checks++;
    if (t_up < 0 || gain < 580 || gain > 700) failures++;
    amp = 12000.0 * 1.41421356;
    settle(400000, t_dn);
    $display("fall settled after %0d samples, gain %0d", t_dn, gain);
    checks++;
    if (t_dn < 0 || gain < 95 || gain > 120) failures++;
    checks++;
    if (t_dn >= t_up) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
