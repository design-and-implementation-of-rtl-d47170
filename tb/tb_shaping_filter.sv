// tb_shaping_filter: checks the raised-cosine FIR bank. For each entry (rate_sel 0, 1, 2: 24, 20
// and 12 samples per symbol) the impulse response is compared tap by tap with a raised-cosine
// (roll-off 0.25, 4 symbols, zero outside them) computed here with real arithmetic and normalised
// to unity DC gain (tolerance 3 LSB on a 16384 impulse); it must peak after the (NTAPS-1)/2 + 1
// clock group delay, and a long constant level must pass at its own amplitude. With bypass the
// input must appear unchanged one clock later.
module tb_shaping_filter;
  import modem_pkg::*;
  localparam int NT = 97;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, in_valid, bypass, out_valid;
  logic [1:0] rate_sel;
  iq_t din, dout;
  int checks = 0, failures = 0;

  shaping_filter dut (.*);

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real rc(input int k, input int sps);
    real t, pi, d;
    pi = 3.14159265358979;
    t = real'(k) / real'(sps);
    if (2 * k > 4 * sps || -2 * k > 4 * sps) return 0.0;
    if (k == 0) return 1.0;
    d = 1.0 - (0.5 * t) * (0.5 * t);
    // limit at t = 1/(2*beta): (pi/4) * sinc(1/(2*beta))
    if (rabs(d) < 1e-9) return (pi / 4.0) * $sin(pi * 2.0) / (pi * 2.0);
    return $sin(pi * t) / (pi * t) * $cos(pi * 0.25 * t) / d;
  endfunction

  initial begin
    #6000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real h [NT];
    real sum, expct;
    int resp [NT + 4];
    int sps;
    rst = 1; in_valid = 1; bypass = 0; din = '0; rate_sel = 2'd0;
    @(posedge clk); #1 rst = 0;
    for (int r = 0; r < 3; r++) begin
      sps = (r == 0) ? 24 : (r == 1) ? 20 : 12;
      rate_sel = 2'(r);
      sum = 0.0;
      for (int n = 0; n < NT; n++) begin h[n] = rc(n - 48, sps); sum += h[n]; end
      din = '0;
      repeat (NT + 2) @(posedge clk);
      #1;
      // impulse of 16384 on I, -16384 on Q
      din.i = 16'sd16384; din.q = -16'sd16384;
      @(posedge clk); #1;
      din = '0;
      for (int n = 0; n < NT + 4; n++) begin
        resp[n] = dout.i;
        checks++;
        if (rabs(real'(dout.q) + real'(dout.i)) > 1.0) failures++;
        @(posedge clk); #1;
      end
      // the output register adds one clock: tap n appears n + 1 clocks after the impulse
      for (int n = 0; n < NT; n++) begin
        expct = 16384.0 * h[n] / sum;
        checks++;
        if (rabs(real'(resp[n + 1]) - expct) > 3.0) begin
          failures++;
          if (failures < 6) $display("sps %0d tap %0d got %0d want %f", sps, n, resp[n + 1], expct);
        end
      end
      checks++;
      if (resp[49] < resp[48] || resp[49] < resp[50]) begin failures++; $display("peak not at group delay"); end
      // DC gain
      din.i = 16'sd20000; din.q = -16'sd12000;
      repeat (NT + 3) @(posedge clk);
      #1;
      checks++;
      if (rabs(real'(dout.i) - 20000.0) > 20.0 || rabs(real'(dout.q) + 12000.0) > 20.0) begin
        failures++; $display("sps %0d dc %0d %0d", sps, dout.i, dout.q);
      end
    end
    // bypass
    bypass = 1;
    for (int n = 0; n < 50; n++) begin
      din.i = 16'($urandom); din.q = 16'($urandom);
      @(posedge clk); #1;
      checks++;
      if (dout !== din || !out_valid) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
