// tb_gardner_sampler: drives the sampler with a sine of period 24 clocks (the DDS at 4x a symbol
// rate of f_clk/96) plus chatter of +-3000 LSB around every zero crossing, and a ramp as the data
// input. Despite the chatter the Schmitt clock must give exactly one rising edge per sine period,
// so sym_strobe comes every 96 clocks and the latched y[n], y[n-1], y[n-2] are ramp values 48
// clocks apart (2 samples per symbol), newest first. In BPSK the Q outputs must be 0.
module tb_gardner_sampler;
  import modem_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, sym_strobe, sample_clk;
  psk_mode_e mode;
  iq_t din, y0, y1, y2;
  logic signed [15:0] dds_sig;
  int checks = 0, failures = 0;

  gardner_sampler dut (.*);

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t, last, nstr;
    real s;
    rst = 1; mode = MODE_QPSK; din = '0; dds_sig = 0;
    @(posedge clk); #1 rst = 0;
    last = -1; nstr = 0;
    for (t = 0; t < 9600; t++) begin
      if (t == 4800) mode = MODE_BPSK;
      s = 30000.0 * $sin(2.0 * 3.14159265358979 * real'(t) / 24.0);
      if (s < 8000.0 && s > -8000.0) s = s + ((t % 2) ? 3000.0 : -3000.0);
      dds_sig = 16'(int'(s));
      din.i = 16'(t % 30000);
      din.q = 16'(-(t % 30000));
      @(posedge clk); #1;
      if (sym_strobe) begin
        nstr++;
        if (last >= 0) begin
          checks++;
          if (t - last != 96) begin failures++; $display("strobe spacing %0d", t - last); end
        end
        last = t;
        checks++;
        if (int'(y0.i) - int'(y1.i) != 48 || int'(y1.i) - int'(y2.i) != 48) begin
          if (t > 300 && y0.i > 200) begin
            failures++;
            $display("samples %0d %0d %0d", y0.i, y1.i, y2.i);
          end
        end
        checks++;
        if (mode == MODE_QPSK && t > 300 && y0.q != -y0.i) failures++;
        if (mode == MODE_BPSK && t > 4900 && (y0.q != 0 || y1.q != 0 || y2.q != 0)) failures++;
      end
    end
    checks++;
    if (nstr < 98 || nstr > 101) begin failures++; $display("strobes %0d", nstr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
