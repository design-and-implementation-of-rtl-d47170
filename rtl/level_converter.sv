// level_converter: unipolar-to-bipolar level conversion with nearest-neighbour resampling.
//
// On each `sym_strobe` the unipolar bits are mapped to polar NRZ levels, '1' -> +LEVEL and
// '0' -> -LEVEL (the mapping of the QPSK coordinate table), and the levels are then held for
// every clock until the next strobe, which resamples the symbol-rate stream to the sample rate
// by repeating the nearest (latest) symbol. In BPSK mode the Q level is 0. Output registers
// change one clock after the strobe; `out_strobe` marks the first sample of each new symbol.
// The mapping follows the document; LEVEL (full-range 16-bit) and the register timing are this
// design's choices.
module level_converter
  import modem_pkg::*;
#(
  parameter int LEVEL = 32767
) (
  input  logic      clk,
  input  logic      rst,
  input  psk_mode_e mode,
  input  logic      sym_strobe,
  input  logic      bit_i,
  input  logic      bit_q,
  output iq_t       nrz,
  output logic      out_strobe
);
  localparam sample_t POS = sample_t'(LEVEL);
  localparam sample_t NEG = sample_t'(-LEVEL);

  always_ff @(posedge clk) begin
    if (rst) begin
      nrz        <= '0;
      out_strobe <= 1'b0;
    end else begin
      out_strobe <= sym_strobe;
      if (sym_strobe) begin
        nrz.i <= bit_i ? POS : NEG;
        nrz.q <= (mode == MODE_QPSK) ? (bit_q ? POS : NEG) : '0;
      end
    end
  end
endmodule
