// tb_modem_rates: end-to-end test of the transceiver at the other symbol rates the modem is
// specified for: 1 Mbps BPSK, 6 Mbps and 10 Mbps QPSK, at a 120 MHz data clock and a 30 MHz IF,
// unshaped, and shaped at 6 and 10 Mbps with the matching entry of the shaping filter bank.
// The symbol-clock DDS of the modulator and the 4x-rate DDS of the clock recovery are set from
// the rate; carrier or symbol-rate offsets are applied in most cases. As in the 5 Msym/s
// test, the received bits are compared with the transmitted ones over the lag and the phase
// ambiguity of the carrier loop. Shaped 10 Mbps QPSK runs without a symbol-rate offset: at 12
// samples per symbol, after the shaping and the receive filter, the clock recovery with these gains
// slips symbols already at a 5 kHz offset. The top is used with its default parameters.
module tb_modem_rates;
  import modem_pkg::*;

  localparam real FCLK = 120.0e6;
  localparam int  MAXS = 4096;

  logic clk = 1'b0;
  always #4 clk = ~clk;

  logic rst;
  psk_mode_e mode;
  logic [31:0] tx_sym_freq, carrier_freq, ddc_freq, cdr_freq;
  logic signed [15:0] tx_sym_phase;
  logic [9:0] seed_i, seed_q;
  logic shape_bypass, noise_en, ps_en;
  logic [1:0] shape_sel;
  logic signed [4:0] tx_shift;
  logic [3:0] noise_atten;
  logic [4:0] cr_kp, cr_ki, ps_kg, cdr_kp, cdr_ki;
  logic [15:0] agc_desired, agc_delta, agc_gain, agc_level;
  logic [4:0] agc_s1, agc_s2, agc_avg;
  logic tx_bit_i, tx_bit_q, tx_strobe, rx_sample_clk;
  sample_t tx_if, rx_if;
  iq_t bb, cr_out, ps_out, rx_symbol;
  phase_t cr_theta, ps_theta;
  logic signed [31:0] cr_freq_est;
  logic signed [19:0] cdr_err;
  logic [1:0] rx_bits;
  logic rx_bits_valid, rx_ser_bit, rx_ser_valid;

  modem_top dut (.*);

  int checks = 0, failures = 0;
  int cnt_bpsk = 0, cnt_qpsk = 0, cnt_switch = 0, cnt_shaped = 0, cnt_unshaped = 0;
  int cnt_cfo = 0, cnt_wrap = 0, cnt_sro = 0, cnt_ps = 0, cnt_agc_dn = 0, cnt_agc_up = 0;
  int cnt_noise = 0;
  int cnt_1m = 0, cnt_6m = 0, cnt_10m = 0;
  real srate = 5.0e6;

  // reference and received bit records
  logic [1:0] txb [MAXS];
  logic [1:0] rxb [MAXS];
  int ntx, nrx;
  logic recording;

  always @(posedge clk) begin
    if (recording && tx_strobe && ntx < MAXS) begin
      txb[ntx] <= {tx_bit_i, tx_bit_q};
      ntx <= ntx + 1;
    end
    if (recording && rx_bits_valid && nrx < MAXS) begin
      rxb[nrx] <= rx_bits;
      nrx <= nrx + 1;
    end
  end

  // carrier phase wrap detector
  phase_t theta_d;
  always @(posedge clk) begin
    theta_d <= cr_theta;
    if (!rst && ((theta_d > 16'sd20000 && cr_theta < -16'sd20000) ||
                 (theta_d < -16'sd20000 && cr_theta > 16'sd20000)))
      cnt_wrap <= cnt_wrap + 1;
  end

  // AGC gain movement
  logic [15:0] gain_d;
  always @(posedge clk) begin
    gain_d <= agc_gain;
    if (!rst && agc_gain > gain_d) cnt_agc_up <= cnt_agc_up + 1;
    if (!rst && agc_gain < gain_d) cnt_agc_dn <= cnt_agc_dn + 1;
  end

  // In BPSK the carrier loop locks 45 degrees off; the stabiliser must have turned by an odd
  // multiple of pi/4 (6434 in Q3.13) to bring the symbols back onto the real axis.
  task automatic ps_check(input psk_mode_e m);
    int a, d;
    a = (ps_theta < 0) ? -int'(ps_theta) : int'(ps_theta);
    d = (a > 12868) ? (a - 19302) : (a - 6434);
    checks++;
    if (d > 1000 || d < -1000) begin
      failures++;
      $display("FAIL phase stabiliser angle %0d is not near an odd multiple of pi/4", ps_theta);
    end else cnt_ps++;
  endtask

  function automatic logic [31:0] fword(input real f);
    return 32'(longint'(f / FCLK * 4294967296.0));
  endfunction

  function automatic logic [1:0] rot(input logic [1:0] b, input int r, input psk_mode_e m);
    if (m == MODE_BPSK) return (r[0] ? {~b[1], 1'b0} : {b[1], 1'b0});
    case (r)
      0: return b;
      1: return {~b[0], b[1]};
      2: return ~b;
      default: return {b[0], ~b[1]};
    endcase
  endfunction

  // best bit error count over lag and rotation, on received symbols from `skip` on
  task automatic score(input psk_mode_e m, input int skip, output int best, output int nbits);
    int e, nr;
    best  = 1 << 30;
    nbits = 0;
    nr = (m == MODE_QPSK) ? 4 : 2;
    for (int lag = 0; lag < 40; lag++)
      for (int r = 0; r < nr; r++) begin
        e = 0;
        for (int k = skip; k < nrx; k++) begin
          logic [1:0] a, b;
          if (k + lag >= ntx) break;
          a = rot(rxb[k], r, m);
          b = txb[(k - lag >= 0) ? k - lag : 0];
          if (k - lag < 0) continue;
          if (m == MODE_QPSK) e += int'(a[1] != b[1]) + int'(a[0] != b[0]);
          else                e += int'(a[1] != b[1]);
        end
        if (e < best) best = e;
      end
    for (int k = skip; k < nrx; k++) nbits += (m == MODE_QPSK) ? 2 : 1;
  endtask

  task automatic setup(input psk_mode_e m, input logic shaped, input real cfo, input real sro,
                       input logic noisy, input logic do_reset);
    mode         = m;
    shape_bypass = !shaped;
    shape_sel    = (srate > 8.0e6) ? 2'd2 : (srate > 5.5e6) ? 2'd1 : 2'd0;
    carrier_freq = fword(30.0e6);
    ddc_freq     = fword(30.0e6 + cfo);
    tx_sym_freq  = fword(srate);
    cdr_freq     = fword(4.0 * (srate + sro));
    noise_en     = noisy;
    if (do_reset) begin
      rst = 1'b1;
      repeat (4) @(posedge clk);
      rst = 1'b0;
    end
  endtask

  task automatic run_case(input string name, input psk_mode_e m, input logic shaped,
                          input real cfo, input real sro, input logic noisy, input int nsym,
                          input int skip, input int maxerr, input logic do_reset);
    int best, nb;
    setup(m, shaped, cfo, sro, noisy, do_reset);
    ntx = 0;
    nrx = 0;
    recording = 1'b1;
    repeat (nsym * int'(FCLK / srate)) @(posedge clk);
    recording = 1'b0;
    @(posedge clk);
    score(m, skip, best, nb);
    checks++;
    if (best > maxerr) begin
      failures++;
      $display("FAIL %s: %0d bit errors in %0d bits (limit %0d), tx %0d rx %0d symbols",
               name, best, nb, maxerr, ntx, nrx);
    end else
      $display("ok   %s: %0d bit errors in %0d bits, cr freq_est %0d", name, best, nb, cr_freq_est);
    if (m == MODE_BPSK) cnt_bpsk++; else cnt_qpsk++;
    if (shaped) cnt_shaped++; else cnt_unshaped++;
    if (cfo != 0.0) cnt_cfo++;
    if (sro != 0.0) cnt_sro++;
    if (noisy) cnt_noise++;
  endtask

  initial begin
    #(8 * 3_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    recording = 1'b0;
    tx_sym_phase = '0;
    seed_i = 10'h2A5;
    seed_q = 10'h13C;
    tx_shift = -5'sd1;
    noise_atten = 4'd3;
    ps_en = 1'b1;
    cr_kp = 5'd6;
    cr_ki = 5'd11;
    ps_kg = 5'd12;
    cdr_kp = 5'd6;
    cdr_ki = 5'd3;
    agc_desired = 16'd3000;
    agc_delta = 16'd200;
    agc_s1 = 5'd10;
    agc_s2 = 5'd4;
    agc_avg = 5'd6;
    setup(MODE_BPSK, 1'b0, 0.0, 0.0, 1'b0, 1'b1);

    srate = 1.0e6;
    cnt_1m++;
    run_case("bpsk 1 Mbps cfo 100k sro 2k", MODE_BPSK, 1'b0, 100.0e3, 2.0e3, 1'b0, 800, 400, 0, 1'b1);
    srate = 6.0e6;
    cnt_6m++;
    run_case("qpsk 6 Mbps cfo 200k sro 14k", MODE_QPSK, 1'b0, 200.0e3, 14.0e3, 1'b0, 2000, 1000, 0, 1'b1);
    srate = 10.0e6;
    cnt_10m++;
    run_case("qpsk 10 Mbps cfo -200k sro -14k", MODE_QPSK, 1'b0, -200.0e3, -14.0e3, 1'b0, 3000, 1500, 0, 1'b1);
    srate = 6.0e6;
    run_case("qpsk 6 Mbps shaped cfo 100k", MODE_QPSK, 1'b1, 100.0e3, 0.0, 1'b0, 2000, 1000, 0, 1'b1);
    srate = 10.0e6;
    run_case("qpsk 10 Mbps shaped", MODE_QPSK, 1'b1, 0.0, 0.0, 1'b0, 3000, 1500, 0, 1'b1);
    run_case("bpsk 10 Mbps noise", MODE_BPSK, 1'b0, 0.0, 0.0, 1'b1, 3000, 1500, 3, 1'b1);

    checks++;
    if (cnt_1m == 0 || cnt_6m == 0 || cnt_10m == 0 || cnt_bpsk == 0 || cnt_qpsk == 0 ||
        cnt_cfo == 0 || cnt_sro == 0 || cnt_wrap == 0) begin
      failures++;
      $display("FAIL a rate or mechanism was never exercised");
    end
    $display("counts: 1M %0d 6M %0d 10M %0d bpsk %0d qpsk %0d cfo %0d sro %0d wrap %0d",
             cnt_1m, cnt_6m, cnt_10m, cnt_bpsk, cnt_qpsk, cnt_cfo, cnt_sro, cnt_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
