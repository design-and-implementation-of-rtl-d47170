// signal_attenuator: gain stage by arithmetic shift.
//
// Multiplies a 16-bit sample by 2^shift using shifts only: a positive `shift` is a left shift
// (amplify, saturated to the 16-bit range), a negative one an arithmetic right shift
// (attenuate, sign kept). The result is registered: one clock of latency, valid follows
// in_valid. Using shifts rather than multipliers for all gain factors follows the document;
// the shift range of -15..+15 and the saturation are this design's choices.
module signal_attenuator
  import modem_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  logic signed [4:0] shift,
  input  sample_t           din,
  output sample_t           dout,
  output logic              out_valid
);
  logic signed [47:0] wide;
  always_comb begin
    if (shift >= 0) wide = 48'(din) <<< shift;
    else            wide = 48'(din) >>> (-shift);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      dout      <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) dout <= sat16(wide);
    end
  end
endmodule
