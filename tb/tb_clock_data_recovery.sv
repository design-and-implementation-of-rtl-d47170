// tb_clock_data_recovery: a baseband NRZ stream (random bits, each symbol reached through a raised-cosine
// transition lasting one symbol, amplitude 16000,
// as after the receive filters) is generated here at a symbol rate of f_clk/24 shifted by
// -0.28 %, 0 and +0.28 % (+-14 kHz at 5 Msym/s), in BPSK and QPSK, while the CDR's DDS runs at
// four times the nominal rate. After the loop has locked, the number of recovered symbols must
// equal the number sent (within 1), and every recovered symbol must carry the transmitted bits
// (the lag between the streams is searched).
module tb_clock_data_recovery;
  import modem_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, sym_strobe, sample_clk;
  psk_mode_e mode;
  iq_t din, symbol;
  logic [31:0] freq_word;
  logic [4:0] kp, ki;
  logic signed [19:0] timing_err;
  logic signed [31:0] loop_out;
  int checks = 0, failures = 0;

  clock_data_recovery dut (.*);

  initial begin
    #60000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NS = 3000;
  logic [1:0] txb [NS + 2];
  logic [1:0] rxb [NS + 200];

  task automatic run(input psk_mode_e m, input real eps);
    real p, frac, vi, vq, a, pi_, pq;
    int k, nrx, ntx_win, nrx_win, best, e;
    mode = m;
    for (int n = 0; n < NS + 2; n++) txb[n] = 2'($urandom);
    rst = 1; @(posedge clk); #1 rst = 0;
    p = 0.0; nrx = 0; nrx_win = 0; ntx_win = 0;
    while (p < real'(NS)) begin
      k = int'($floor(p));
      frac = p - real'(k);
      a = 0.5 - 0.5 * $cos(3.14159265358979 * frac);
      pi_ = (k > 0) ? (txb[k-1][1] ? 16000.0 : -16000.0) : 0.0;
      pq  = (k > 0) ? (txb[k-1][0] ? 16000.0 : -16000.0) : 0.0;
      vi = pi_ + a * ((txb[k][1] ? 16000.0 : -16000.0) - pi_);
      vq = pq + a * ((txb[k][0] ? 16000.0 : -16000.0) - pq);
      din.i = 16'(int'(vi));
      din.q = (m == MODE_QPSK) ? 16'(int'(vq)) : 16'sd0;
      @(posedge clk); #1;
      p += (1.0 + eps) / 24.0;
      if (p >= 1000.0 && p < 2000.0 && k != int'($floor(p))) ntx_win++;
      if (sym_strobe) begin
        if (p >= 1000.0 && p < 2000.0) nrx_win++;
        if (nrx < NS + 200) rxb[nrx] = {symbol.i > 0, symbol.q > 0};
        nrx++;
      end
    end
    checks++;
    if (nrx_win < ntx_win - 1 || nrx_win > ntx_win + 1) begin
      failures++;
      $display("eps %f: %0d symbols recovered for %0d sent", eps, nrx_win, ntx_win);
    end
    best = 1 << 30;
    for (int lag = -5; lag < 10; lag++) begin
      e = 0;
      for (int r = 1500; r < 2500; r++) begin
        if (r - lag < 0 || r - lag >= NS) continue;
        if (rxb[r][1] != txb[r - lag][1]) e++;
        if (m == MODE_QPSK && rxb[r][0] != txb[r - lag][0]) e++;
      end
      if (e < best) best = e;
    end
    checks++;
    if (best != 0) begin failures++; $display("mode %0d eps %f: %0d bit errors", m, eps, best); end
  endtask

  initial begin
    freq_word = 32'd715827883;   // 4 x f_clk/24
    kp = 6; ki = 2;   // integral gain 2^-2: margin for a BPSK-only error signal at +-0.28 %
    run(MODE_BPSK, 0.0);
    run(MODE_BPSK, 0.0028);
    run(MODE_QPSK, -0.0028);
    run(MODE_QPSK, 0.0028);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
