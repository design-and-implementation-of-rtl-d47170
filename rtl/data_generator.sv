// data_generator: deterministic I/Q bit source of the modulator.
//
// A DDS set by `freq_word` (and delayed by `phase_off`) is the symbol clock: its 16-bit sine is
// reduced to its sign, and each rising edge of that sign makes both LFSRs step once, so the
// symbol rate is freq_word * f_clk / 2^32. The I LFSR is seeded by `seed_i`, the Q LFSR by
// `seed_q`; `rst` reloads both seeds. In BPSK mode the Q stream is held at 0 (disabled). In QPSK
// both streams advance per symbol, so the bit rate is twice that of BPSK at the same DDS setting.
// `sym_strobe` is high for one clock in the cycle the new bits appear on `bit_i`/`bit_q`.
// The structure (DDS, sign, two seeded LFSRs) follows the document; generating the LFSR step as an
// enable in the system clock domain is this design's choice.
module data_generator
  import modem_pkg::*;
#(
  parameter int LFSR_W = 10
) (
  input  logic              clk,
  input  logic              rst,
  input  psk_mode_e         mode,
  input  logic [31:0]       freq_word,
  input  logic signed [15:0] phase_off,
  input  logic [LFSR_W-1:0] seed_i,
  input  logic [LFSR_W-1:0] seed_q,
  output logic              bit_i,
  output logic              bit_q,
  output logic              sym_strobe
);
  logic               dds_valid;
  logic signed [15:0] dds_cos, dds_sin;
  logic               sgn, sgn_d, step;
  logic               li, lq;
  logic [LFSR_W-1:0]  st_i, st_q;

  dds u_dds (
    .clk(clk), .rst(rst), .freq_word(freq_word), .phase_off(phase_off),
    .out_valid(dds_valid), .cos_o(dds_cos), .sin_o(dds_sin)
  );

  // sign detector: '1' for a positive sine
  assign sgn = dds_valid && (dds_sin > 0);

  always_ff @(posedge clk) begin
    if (rst) begin
      sgn_d      <= 1'b0;
      sym_strobe <= 1'b0;
    end else begin
      sgn_d      <= sgn;
      sym_strobe <= step;
    end
  end
  assign step = sgn && !sgn_d;

  lfsr #(.WIDTH(LFSR_W)) u_lfsr_i (
    .clk(clk), .rst(rst), .step(step), .seed(seed_i), .bit_out(li), .state(st_i)
  );
  lfsr #(.WIDTH(LFSR_W)) u_lfsr_q (
    .clk(clk), .rst(rst), .step(step), .seed(seed_q), .bit_out(lq), .state(st_q)
  );

  assign bit_i = li;
  assign bit_q = (mode == MODE_QPSK) ? lq : 1'b0;
endmodule
