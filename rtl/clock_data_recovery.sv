// clock_data_recovery: Gardner symbol timing recovery.
//
// A DDS runs at `freq_word`, set to 4x the nominal symbol rate (f = freq_word * f_clk / 2^32).
// The sampler derives from its sine a 2x-symbol-rate sampling instant and a symbol-rate latch
// (gardner_sampler), the Gardner detector forms the timing error of each symbol
// (gardner_ted), and a PI loop filter (g_p = 2^-kp, g_i = 2^-ki applied to the error directly,
// output wrapping as a phase) produces c, whose low 16 bits are subtracted from the DDS phase
// input: a late sampling instant gives a negative error, which advances the DDS phase
// and moves the next sampling instants earlier. The integral term keeps tracking a symbol rate
// offset. `symbol` is the newest sample y[n] of each latch, valid with the one-clock
// `sym_strobe`; `sample_clk` is the recovered symbol clock. The loop structure (Gardner detector,
// PI filter, DDS at 4x the symbol rate steered through its phase input, Schmitt-level sampler)
// follows the document; the scaling, the sign arrangement and the widths are this design's.
module clock_data_recovery
  import modem_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  psk_mode_e   mode,
  input  iq_t         din,
  input  logic [31:0] freq_word,
  input  logic [4:0]  kp,
  input  logic [4:0]  ki,
  output iq_t         symbol,
  output logic        sym_strobe,
  output logic        sample_clk,
  output logic signed [19:0] timing_err,
  output logic signed [31:0] loop_out
);
  logic               dds_valid;
  logic signed [15:0] dds_cos, dds_sin;
  logic signed [15:0] phase_off;
  iq_t                y0, y1, y2;
  logic               s_strobe;
  logic               e_valid, lf_valid;
  logic signed [31:0] integ;

  assign phase_off = -loop_out[15:0];

  dds u_dds (
    .clk(clk), .rst(rst), .freq_word(freq_word), .phase_off(phase_off),
    .out_valid(dds_valid), .cos_o(dds_cos), .sin_o(dds_sin)
  );

  gardner_sampler u_samp (
    .clk(clk), .rst(rst), .mode(mode), .din(din),
    .dds_sig(dds_valid ? dds_sin : 16'sd0),
    .y0(y0), .y1(y1), .y2(y2), .sym_strobe(s_strobe), .sample_clk(sample_clk)
  );

  gardner_ted u_ted (
    .clk(clk), .rst(rst), .in_valid(s_strobe), .y0(y0), .y1(y1), .y2(y2),
    .err(timing_err), .out_valid(e_valid)
  );

  pi_loop_filter #(.W_IN(20), .W(32), .FRAC(0), .SAT(1'b0)) u_lf (
    .clk(clk), .rst(rst), .in_valid(e_valid), .din(timing_err), .kp(kp), .ki(ki),
    .dout(loop_out), .integ(integ), .out_valid(lf_valid)
  );

  assign symbol     = y0;
  assign sym_strobe = s_strobe;
endmodule
