// phase_error_estimator: decision-directed cross-product phase detector.
//
// QPSK form: e = Im(x)*sign(Re(x)) - Re(x)*sign(Im(x)); it is zero when the sample lies on a
// diagonal (pi/4 + k*pi/2) and, for a symbol of amplitude A per axis, about 2*A*phi for a small
// counter-clockwise phase error phi. BPSK form: e = Im(x)*sign(Re(x)), zero on the real axis.
// The data modulation is removed by the sign terms, so no multiplier is needed. sign() is +1
// for a value above zero and -1 otherwise. The carrier recovery loop always uses the QPSK form;
// the phase stabiliser selects the form of the active PSK scheme. Output is registered:
// one clock of latency, out_valid follows in_valid. The QPSK equation follows the document; the
// BPSK form and the handling of a zero input are this design's choices.
module phase_error_estimator
  import modem_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  input  psk_mode_e  mode,
  input  iq_t        din,
  output logic signed [17:0] err,
  output logic       out_valid
);
  logic signed [17:0] q_s, i_s, e_c;
  always_comb begin
    q_s = (din.i > 0) ? 18'(din.q) : -18'(din.q);
    i_s = (din.q > 0) ? 18'(din.i) : -18'(din.i);
    e_c = (mode == MODE_QPSK) ? (q_s - i_s) : q_s;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      err       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) err <= e_c;
    end
  end
endmodule
