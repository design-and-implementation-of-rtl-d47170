// tb_noise_generator: over 40000 samples the noise must have a mean near 0, a standard deviation
// near 18919/sqrt(4) = 9459 LSB (sum of four uniform 16-bit values divided by four), a lag-one
// correlation below 0.05 (white), and a kurtosis near 3 (Gaussian-like; a single uniform source
// gives 1.8). Each attenuation bit must halve the deviation, and a disabled generator gives 0.
module tb_noise_generator;
  import modem_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, enable;
  logic [3:0] atten;
  sample_t noise;
  int checks = 0, failures = 0;

  noise_generator dut (.*);

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input logic [3:0] a, output real sd, output real rho, output real kurt,
                         output real mean);
    real s1, s2, s4, sc, prev, x;
    int n;
    atten = a;
    repeat (3) @(posedge clk);
    s1 = 0; s2 = 0; s4 = 0; sc = 0; prev = 0;
    n = 40000;
    for (int k = 0; k < n; k++) begin
      @(posedge clk); #1;
      x = real'(noise);
      s1 += x; s2 += x * x; s4 += x * x * x * x; sc += x * prev;
      prev = x;
    end
    mean = s1 / n;
    sd = $sqrt(s2 / n - mean * mean);
    rho = (sc / n) / (s2 / n);
    kurt = (s4 / n) / ((s2 / n) * (s2 / n));
  endtask

  initial begin
    real sd0, sd2, rho, kurt, mean;
    rst = 1; enable = 1; atten = 0;
    @(posedge clk); #1 rst = 0;
    measure(4'd0, sd0, rho, kurt, mean);
    $display("sd %f rho %f kurt %f mean %f", sd0, rho, kurt, mean);
    checks++; if (rabs(sd0 - 9459.0) > 500.0) failures++;
    checks++; if (rabs(rho) > 0.05) failures++;
    checks++; if (kurt < 2.6 || kurt > 3.2) failures++;
    checks++; if (rabs(mean) > 300.0) failures++;
    measure(4'd2, sd2, rho, kurt, mean);
    checks++; if (rabs(sd2 * 4.0 - sd0) > 0.06 * sd0) failures++;
    enable = 0;
    repeat (2) @(posedge clk);
    #1;
    checks++; if (noise != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
