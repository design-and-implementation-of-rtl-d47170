// carrier_recovery: adapted Costas loop for complex baseband samples.
//
// The phase shifter turns each input sample by the running estimate theta; the QPSK
// cross-product detector measures the remaining phase error e of the turned sample; the loop
// filter H1 forms X2 = g_p*e + (sum of earlier g_i*e) (pi_loop_filter), and H2 accumulates
// theta <- wrap(theta - X2) so that the phase keeps rotating against a carrier frequency offset.
// The wrapper holds theta inside [-pi, pi]; for a frequency offset theta is a saw-tooth and the
// integral of H1 settles to the offset in radians per sample. The detector is the QPSK one for
// both schemes, so a BPSK constellation locks at 45 degrees and is turned back by the phase
// stabiliser. g_p = 2^-kp and g_i = 2^-ki (the detector output is scaled by 2^13 into the
// loop's Q3.29 phase units). Samples enter when in_valid is high; the loop delay is 5 clocks, so
// a new input may arrive every clock. Output latency: 2 clocks. The structure and equations follow
// the document; the fixed-point formats and latencies are this design's.
module carrier_recovery
  import modem_pkg::*;
#(
  parameter int ACC_W = 32,
  parameter int FRAC  = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  iq_t         din,
  input  logic [4:0]  kp,
  input  logic [4:0]  ki,
  output iq_t         dout,
  output logic        out_valid,
  output phase_t      theta,
  output logic signed [ACC_W-1:0] freq_est
);
  iq_t                    rot;
  logic                   rot_valid;
  logic signed [17:0]     e;
  logic                   e_valid;
  logic signed [ACC_W-1:0] x2;
  logic                   x2_valid;
  logic signed [ACC_W-1:0] ph;
  logic signed [ACC_W+1:0] ph_next;
  logic signed [ACC_W+1:0] ph_sub;

  phase_shifter u_shift (
    .clk(clk), .rst(rst), .in_valid(in_valid), .din(din), .theta(theta),
    .dout(rot), .out_valid(rot_valid)
  );

  phase_error_estimator u_ped (
    .clk(clk), .rst(rst), .in_valid(rot_valid), .mode(MODE_QPSK), .din(rot),
    .err(e), .out_valid(e_valid)
  );

  pi_loop_filter #(.W_IN(18), .W(ACC_W), .FRAC(13)) u_lf (
    .clk(clk), .rst(rst), .in_valid(e_valid), .din(e), .kp(kp), .ki(ki),
    .dout(x2), .integ(freq_est), .out_valid(x2_valid)
  );

  assign ph_sub = (ACC_W+2)'(ph) - (ACC_W+2)'(x2);

  phase_wrapper #(.W(ACC_W+2), .FRAC(FRAC)) u_wrap (
    .din(ph_sub), .dout(ph_next)
  );

  always_ff @(posedge clk) begin
    if (rst)           ph <= '0;
    else if (x2_valid) ph <= ph_next[ACC_W-1:0];
  end

  assign theta     = phase_t'(ph >>> FRAC);
  assign dout      = rot;
  assign out_valid = rot_valid;
endmodule
