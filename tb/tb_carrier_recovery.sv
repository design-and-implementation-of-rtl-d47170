// tb_carrier_recovery: random QPSK symbols (amplitude 8000 per axis, 24 samples each) are
// rotated here by a carrier offset of +-150 kHz at 120 MHz plus a start phase. After lock the
// loop's frequency estimate must equal the offset in Q3.29 radians per sample (within 3 %), the
// output samples must sit on the diagonals (|I| and |Q| within 6 % of each other), and the phase
// estimate must have wrapped around [-pi, pi]. A BPSK input (points on the real axis) must also be
// locked, at 45 degrees, which the phase stabiliser later turns back.
module tb_carrier_recovery;
  import modem_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, in_valid, out_valid;
  iq_t din, dout;
  logic [4:0] kp, ki;
  phase_t theta;
  logic signed [31:0] freq_est;
  int checks = 0, failures = 0;

  carrier_recovery dut (.*);

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input real foff, input logic qpsk);
    real ph, w, si, sq, ratio;
    int wraps, bad;
    phase_t th_d;
    w = 2.0 * 3.14159265358979 * foff / 120.0e6;
    ph = 0.7;
    rst = 1; in_valid = 0; din = '0;
    @(posedge clk); #1 rst = 0;
    wraps = 0; bad = 0;
    th_d = 0;
    for (int n = 0; n < 60000; n++) begin
      if (n % 24 == 0) begin
        si = ($urandom % 2) ? 8000.0 : -8000.0;
        sq = qpsk ? (($urandom % 2) ? 8000.0 : -8000.0) : 0.0;
        if (!qpsk) si = si * 1.41421356;
      end
      din.i = 16'(int'(si * $cos(ph) - sq * $sin(ph)));
      din.q = 16'(int'(si * $sin(ph) + sq * $cos(ph)));
      ph += w;
      in_valid = 1;
      @(posedge clk); #1;
      if ((th_d > 16'sd20000 && theta < -16'sd20000) || (th_d < -16'sd20000 && theta > 16'sd20000)) wraps++;
      th_d = theta;
      if (n > 40000 && out_valid && (n % 24) == 12) begin
        ratio = rabs(real'(dout.i)) / (rabs(real'(dout.q)) + 1.0);
        if (ratio < 0.94 || ratio > 1.06) bad++;
      end
    end
    checks++;
    if (bad > 0) begin failures++; $display("foff %f: %0d samples off the diagonals", foff, bad); end
    checks++;
    if (rabs(real'(freq_est) / 536870912.0 - w) > 0.03 * rabs(w)) begin
      failures++;
      $display("foff %f: freq_est %f want %f", foff, real'(freq_est) / 536870912.0, w);
    end
    checks++;
    if (wraps < 2) begin failures++; $display("no phase wrap"); end
  endtask

  initial begin
    kp = 6; ki = 11;
    run(150.0e3, 1'b1);
    run(-150.0e3, 1'b1);
    run(60.0e3, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
