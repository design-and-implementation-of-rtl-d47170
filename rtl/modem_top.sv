// modem_top: all-digital BPSK/QPSK transceiver (modulator, noise channel and demodulator).
//
// Transmit side: the data generator (DDS symbol clock, two seeded 10-bit LFSRs) produces the I/Q
// bits; the level converter turns them into held polar NRZ levels; the raised-cosine shaping
// filter bank smooths them (entry chosen by shape_sel: 5, 6 or 10 Msym/s at 120 MHz) or is bypassed; the up-converter mixes them onto a DDS carrier, and a shift
// attenuator sets the transmit level. Channel: white Gaussian-like noise of adjustable power is
// added and the sum is saturated to 16 bits (the ADC sample `rx_if`). Receive side: the DDC
// (DDS, mixers, moving-average LPF, down-sampler) returns to complex baseband; the carrier
// recovery (adapted Costas loop) removes the carrier frequency offset; the phase stabiliser
// removes the residual phase; the Gardner clock and data recovery samples one value per symbol;
// the symbol decider makes bits. The AGC watches `rx_if` and produces a gain code for an analog
// gain stage that this all-digital path does not have, so `agc_gain` is only brought out.
// The symbol-rate offset is set by the difference between tx_sym_freq and cdr_freq/4, the carrier
// offset by the difference between carrier_freq and ddc_freq. All blocks run on one clock `clk`
// (the document's data clock is 120 MHz); every frequency word is f * 2^32 / f_clk. The mode,
// rates, gains and offsets may be changed at any time. Reference bits (`tx_bit_*`) are brought out
// so that a bit error counter outside can compare them with `rx_bits`, as the host does in the
// document; the recovered bits with their strobe stand for the capture trigger towards the host.
module modem_top
  import modem_pkg::*;
#(
  parameter int SPS     = 24,
  parameter int SPS1    = 20,
  parameter int SPS2    = 12,
  parameter int LPF_LEN = 8,
  parameter int DEC     = 1
) (
  input  logic              clk,
  input  logic              rst,
  input  psk_mode_e         mode,
  // modulator
  input  logic [31:0]       tx_sym_freq,
  input  logic signed [15:0] tx_sym_phase,
  input  logic [9:0]        seed_i,
  input  logic [9:0]        seed_q,
  input  logic              shape_bypass,
  input  logic [1:0]        shape_sel,
  input  logic [31:0]       carrier_freq,
  input  logic signed [4:0] tx_shift,
  input  logic              noise_en,
  input  logic [3:0]        noise_atten,
  // demodulator
  input  logic [31:0]       ddc_freq,
  input  logic [4:0]        cr_kp,
  input  logic [4:0]        cr_ki,
  input  logic              ps_en,
  input  logic [4:0]        ps_kg,
  input  logic [31:0]       cdr_freq,
  input  logic [4:0]        cdr_kp,
  input  logic [4:0]        cdr_ki,
  // AGC
  input  logic [15:0]       agc_desired,
  input  logic [15:0]       agc_delta,
  input  logic [4:0]        agc_s1,
  input  logic [4:0]        agc_s2,
  input  logic [4:0]        agc_avg,
  output logic [15:0]       agc_gain,
  output logic [15:0]       agc_level,
  // observation
  output logic              tx_bit_i,
  output logic              tx_bit_q,
  output logic              tx_strobe,
  output sample_t           tx_if,
  output sample_t           rx_if,
  output iq_t               bb,
  output iq_t               cr_out,
  output iq_t               ps_out,
  output phase_t            cr_theta,
  output phase_t            ps_theta,
  output logic signed [31:0] cr_freq_est,
  output iq_t               rx_symbol,
  output logic              rx_sample_clk,
  output logic signed [19:0] cdr_err,
  output logic [1:0]        rx_bits,
  output logic              rx_bits_valid,
  output logic              rx_ser_bit,
  output logic              rx_ser_valid
);
  iq_t     nrz, shaped;
  logic    nrz_strobe, shaped_valid;
  sample_t up;
  logic    up_valid, att_valid;
  sample_t noise;
  logic    bb_valid, cr_valid, ps_valid;
  logic    sym_strobe;
  logic signed [31:0] cdr_loop;

  // ---------------- modulator ----------------
  data_generator u_datagen (
    .clk(clk), .rst(rst), .mode(mode), .freq_word(tx_sym_freq), .phase_off(tx_sym_phase),
    .seed_i(seed_i), .seed_q(seed_q), .bit_i(tx_bit_i), .bit_q(tx_bit_q), .sym_strobe(tx_strobe)
  );

  level_converter u_level (
    .clk(clk), .rst(rst), .mode(mode), .sym_strobe(tx_strobe), .bit_i(tx_bit_i),
    .bit_q(tx_bit_q), .nrz(nrz), .out_strobe(nrz_strobe)
  );

  shaping_filter #(.SPS(SPS), .SPS1(SPS1), .SPS2(SPS2)) u_shape (
    .clk(clk), .rst(rst), .in_valid(1'b1), .bypass(shape_bypass), .rate_sel(shape_sel), .din(nrz),
    .dout(shaped), .out_valid(shaped_valid)
  );

  upconverter u_up (
    .clk(clk), .rst(rst), .freq_word(carrier_freq), .din(shaped), .dout(up),
    .out_valid(up_valid)
  );

  signal_attenuator u_txatt (
    .clk(clk), .rst(rst), .in_valid(up_valid), .shift(tx_shift), .din(up),
    .dout(tx_if), .out_valid(att_valid)
  );

  // ---------------- channel ----------------
  noise_generator u_noise (
    .clk(clk), .rst(rst), .enable(noise_en), .atten(noise_atten), .noise(noise)
  );

  always_ff @(posedge clk) begin
    if (rst) rx_if <= '0;
    else     rx_if <= sat16(48'(tx_if) + 48'(noise));
  end

  // ---------------- demodulator ----------------
  ddc #(.LPF_LEN(LPF_LEN), .DEC(DEC)) u_ddc (
    .clk(clk), .rst(rst), .in_valid(1'b1), .din(rx_if), .freq_word(ddc_freq),
    .dout(bb), .out_valid(bb_valid)
  );

  carrier_recovery u_cr (
    .clk(clk), .rst(rst), .in_valid(bb_valid), .din(bb), .kp(cr_kp), .ki(cr_ki),
    .dout(cr_out), .out_valid(cr_valid), .theta(cr_theta), .freq_est(cr_freq_est)
  );

  phase_stabilizer u_ps (
    .clk(clk), .rst(rst), .in_valid(cr_valid), .mode(mode), .enable(ps_en), .din(cr_out),
    .kg(ps_kg), .dout(ps_out), .out_valid(ps_valid), .theta(ps_theta)
  );

  clock_data_recovery u_cdr (
    .clk(clk), .rst(rst), .mode(mode), .din(ps_out), .freq_word(cdr_freq), .kp(cdr_kp),
    .ki(cdr_ki), .symbol(rx_symbol), .sym_strobe(sym_strobe), .sample_clk(rx_sample_clk),
    .timing_err(cdr_err), .loop_out(cdr_loop)
  );

  symbol_decider u_dec (
    .clk(clk), .rst(rst), .mode(mode), .sym_strobe(sym_strobe), .symbol(rx_symbol),
    .bits(rx_bits), .bits_valid(rx_bits_valid), .ser_bit(rx_ser_bit), .ser_valid(rx_ser_valid)
  );

  agc u_agc (
    .clk(clk), .rst(rst), .in_valid(1'b1), .din(rx_if), .desired_level(agc_desired),
    .delta_l(agc_delta), .s1(agc_s1), .s2(agc_s2), .avg_shift(agc_avg), .gain(agc_gain),
    .level(agc_level), .err()
  );
endmodule
