// upconverter: internal digital up-conversion of the complex baseband to a real IF signal.
//
// s = I*cos(w t) - Q*sin(w t), with cos/sin from a DDS set by `freq_word`
// (f_c = freq_word * f_clk / 2^32). The sum of the two 16x16 products is scaled by 2^-16 so
// that it cannot overflow (a full-range QPSK symbol reaches about 0.71 of full scale). Input
// samples are taken every clock; the output is registered, 2 clocks after the DDS reset and
// one clock after each input. The document uses this up-conversion in its all-digital testbed
// (in the radio-based one the radio's own up-converter takes the baseband); the scaling is this
// design's choice.
module upconverter
  import modem_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] freq_word,
  input  iq_t         din,
  output sample_t     dout,
  output logic        out_valid
);
  logic               lo_valid;
  logic signed [15:0] lo_cos, lo_sin;
  logic signed [47:0] mix;

  dds u_dds (
    .clk(clk), .rst(rst), .freq_word(freq_word), .phase_off(16'sd0),
    .out_valid(lo_valid), .cos_o(lo_cos), .sin_o(lo_sin)
  );

  assign mix = 48'(din.i) * 48'(lo_cos) - 48'(din.q) * 48'(lo_sin);

  always_ff @(posedge clk) begin
    if (rst) begin
      dout      <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= lo_valid;
      dout      <= sat16(mix >>> 16);
    end
  end
endmodule
