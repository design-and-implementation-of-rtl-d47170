// tb_ddc: an IF signal s = (I*cos(w t) - Q*sin(w t))/2 is synthesised here with real arithmetic
// at 30 MHz (f_clk/4) and, with the DDC tuned to the same frequency, the baseband output must
// settle to the magnitude of (I, Q) within 1 % and keep a constant phase (the absolute phase
// depends on the oscillators' start and is left to the carrier recovery). With the DDC tuned 100 kHz off, the output must rotate at the
// offset: its magnitude stays |(I, Q)| and its phase advances by about 2*pi*100e3/120e6 per clock.
// A run with DEC = 4 checks that out_valid comes once in four clocks.
module tb_ddc;
  import modem_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, in_valid, out_valid, out_valid4;
  sample_t din;
  logic [31:0] freq_word;
  iq_t dout, dout4;
  int checks = 0, failures = 0;

  ddc dut (.*);
  ddc #(.DEC(4)) dut4 (.clk(clk), .rst(rst), .in_valid(in_valid), .din(din),
    .freq_word(freq_word), .dout(dout4), .out_valid(out_valid4));

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real ti, tq;
  longint t;
  always @(posedge clk) begin
    real w;
    w = 2.0 * 3.14159265358979 * 30.0e6 / 120.0e6;
    din <= 16'(int'((ti * $cos(w * real'(t)) - tq * $sin(w * real'(t))) / 2.0));
    t <= t + 1;
  end

  initial begin
    real mag, ph, ph_prev, dph, sdph;
    int nv;
    t = 0;
    ti = 16000.0; tq = -9000.0;
    rst = 1; in_valid = 1; freq_word = 32'h4000_0000;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    nv = 0;
    repeat (200) begin
      @(posedge clk); #1;
      if (out_valid4) nv++;
    end
    checks++;
    if (nv < 48 || nv > 51) begin failures++; $display("DEC=4 valid count %0d", nv); end
    ph_prev = $atan2(real'(dout.q), real'(dout.i));
    for (int n = 0; n < 100; n++) begin
      @(posedge clk); #1;
      mag = $sqrt(real'(dout.i) * real'(dout.i) + real'(dout.q) * real'(dout.q));
      ph = $atan2(real'(dout.q), real'(dout.i));
      checks++;
      if (rabs(mag - 18357.0) > 0.01 * 18357.0 || rabs(ph - ph_prev) > 0.01) begin
        failures++;
        if (failures < 5) $display("got %0d %0d", dout.i, dout.q);
      end
    end
    // 100 kHz offset
    freq_word = 32'(longint'((30.0e6 + 100.0e3) / 120.0e6 * 4294967296.0));
    repeat (50) @(posedge clk);
    #1;
    ph_prev = $atan2(real'(dout.q), real'(dout.i));
    sdph = 0;
    for (int n = 0; n < 2000; n++) begin
      @(posedge clk); #1;
      mag = $sqrt(real'(dout.i) * real'(dout.i) + real'(dout.q) * real'(dout.q));
      ph = $atan2(real'(dout.q), real'(dout.i));
      dph = ph - ph_prev;
      if (dph > 3.14159265358979) dph -= 2.0 * 3.14159265358979;
      if (dph < -3.14159265358979) dph += 2.0 * 3.14159265358979;
      sdph += dph;
      ph_prev = ph;
      checks++;
      if (rabs(mag - 18357.0) > 0.02 * 18357.0) begin
        failures++;
        if (failures < 5) $display("mag %f", mag);
      end
    end
    checks++;
    if (rabs(rabs(sdph / 2000.0) - 2.0 * 3.14159265358979 * 100.0e3 / 120.0e6) > 1.0e-4) begin
      failures++;
      $display("rotation per clock %f", sdph / 2000.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
