// tb_phase_error_estimator: random complex inputs; the registered error must be
// Q*sign(I) - I*sign(Q) in QPSK and Q*sign(I) in BPSK (sign(x) = +1 for x > 0, else -1).
// Points rotated slightly counter-clockwise from a diagonal must give a positive error.
module tb_phase_error_estimator;
  import modem_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, in_valid, out_valid;
  psk_mode_e mode;
  iq_t din;
  logic signed [17:0] err;
  int checks = 0, failures = 0;

  phase_error_estimator dut (.*);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int si, sq, e;
    rst = 1; in_valid = 0; mode = MODE_QPSK; din = '0;
    @(posedge clk); #1 rst = 0;
    for (int n = 0; n < 3000; n++) begin
      mode = psk_mode_e'(n % 2);
      din.i = 16'($urandom); din.q = 16'($urandom);
      if (n % 50 == 0) din.i = 0;
      in_valid = 1;
      @(posedge clk); #1;
      si = (din.i > 0) ? 1 : -1;
      sq = (din.q > 0) ? 1 : -1;
      e = (mode == MODE_QPSK) ? (int'(din.q) * si - int'(din.i) * sq) : int'(din.q) * si;
      checks++;
      if (int'(err) != e || !out_valid) begin
        failures++;
        if (failures < 5) $display("got %0d want %0d", err, e);
      end
    end
    // direction: 45 degrees plus a small counter-clockwise turn, each quadrant
    mode = MODE_QPSK;
    din.i = 16'sd10000; din.q = 16'sd11000;  @(posedge clk); #1; checks++; if (err <= 0) failures++;
    din.i = -16'sd11000; din.q = 16'sd10000; @(posedge clk); #1; checks++; if (err <= 0) failures++;
    din.i = -16'sd10000; din.q = -16'sd11000; @(posedge clk); #1; checks++; if (err <= 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
