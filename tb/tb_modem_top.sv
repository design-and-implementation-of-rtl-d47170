// tb_modem_top: end-to-end test of the all-digital BPSK/QPSK transceiver.
//
// Each case resets the modem, sets the data clock to 120 MHz nominal, a symbol rate of 5 Msym/s
// (24 samples per symbol, matching the shaping filter) and an IF of 30 MHz, then applies a carrier
// frequency offset (ddc_freq differs from carrier_freq), a symbol-rate offset (cdr_freq/4 differs
// from tx_sym_freq), optional shaping and optional noise. After the loops have had time to lock,
// the recovered bits are compared with the transmitted reference bits: the lag between the two
// streams and the phase ambiguity of the carrier loop (two positions in BPSK, four in QPSK) are
// searched, as a receiver would by correlating with the known LFSR sequence, and the case passes
// when the bit errors are below a limit. The test counts how often each mechanism was exercised:
// BPSK and QPSK modes, a mode switch without reset, shaped and unshaped transmission, a carrier
// offset (and the wrapping of the carrier phase), a symbol-rate offset, the phase stabiliser's
// correction of the 45-degree BPSK lock, and AGC gain decreases and increases.
module tb_modem_top;
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
    shape_sel    = 2'd0;
    carrier_freq = fword(30.0e6);
    ddc_freq     = fword(30.0e6 + cfo);
    tx_sym_freq  = fword(5.0e6);
    cdr_freq     = fword(4.0 * (5.0e6 + sro));
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
    repeat (nsym * 24) @(posedge clk);
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
    #(8 * 2_000_000);
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

    run_case("bpsk ideal", MODE_BPSK, 1'b0, 0.0, 0.0, 1'b0, 600, 300, 0, 1'b1);
    run_case("qpsk ideal", MODE_QPSK, 1'b0, 0.0, 0.0, 1'b0, 600, 300, 0, 1'b1);
    run_case("bpsk cfo 100k", MODE_BPSK, 1'b0, 100.0e3, 0.0, 1'b0, 1200, 600, 0, 1'b1);
    run_case("qpsk cfo -100k", MODE_QPSK, 1'b0, -100.0e3, 0.0, 1'b0, 1200, 600, 0, 1'b1);
    run_case("bpsk sro 10k", MODE_BPSK, 1'b0, 0.0, 10.0e3, 1'b0, 1200, 600, 0, 1'b1);
    run_case("qpsk sro -10k", MODE_QPSK, 1'b0, 0.0, -10.0e3, 1'b0, 1200, 600, 0, 1'b1);
    run_case("bpsk shaped", MODE_BPSK, 1'b1, 0.0, 0.0, 1'b0, 600, 300, 0, 1'b1);
    run_case("qpsk noise", MODE_QPSK, 1'b0, 0.0, 0.0, 1'b1, 600, 300, 3, 1'b1);
    agc_desired = 16'd20000;
    run_case("bpsk cfo 200k sro 14k noise", MODE_BPSK, 1'b0, 200.0e3, 14.0e3, 1'b1, 2000, 1000, 3, 1'b1);
    ps_check(MODE_BPSK);
    // mode switch while running, no reset
    cnt_switch++;
    run_case("switch to qpsk cfo -200k sro -14k", MODE_QPSK, 1'b0, -200.0e3, -14.0e3, 1'b0, 2000, 1000, 0, 1'b0);
    cnt_switch++;
    run_case("switch to bpsk shaped cfo 50k", MODE_BPSK, 1'b1, 50.0e3, 0.0, 1'b0, 2000, 1000, 0, 1'b0);
    ps_check(MODE_BPSK);
    run_case("qpsk shaped sro 5k", MODE_QPSK, 1'b1, 0.0, 5.0e3, 1'b0, 2000, 1000, 0, 1'b1);

    checks++;
    if (cnt_bpsk == 0 || cnt_qpsk == 0 || cnt_switch == 0 || cnt_shaped == 0 || cnt_unshaped == 0 ||
        cnt_cfo == 0 || cnt_wrap == 0 || cnt_sro == 0 || cnt_ps == 0 || cnt_noise == 0 ||
        cnt_agc_dn == 0 || cnt_agc_up == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end

    $display("counts: bpsk %0d qpsk %0d switch %0d shaped %0d unshaped %0d cfo %0d wrap %0d sro %0d ps %0d noise %0d agc_dn %0d agc_up %0d",
             cnt_bpsk, cnt_qpsk, cnt_switch, cnt_shaped, cnt_unshaped, cnt_cfo, cnt_wrap,
             cnt_sro, cnt_ps, cnt_noise, cnt_agc_dn, cnt_agc_up);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
