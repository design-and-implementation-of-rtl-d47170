// phase_stabilizer: second, slow rotation loop that removes the residual carrier phase.
//
// The input (the carrier recovery output) is turned by theta in a phase shifter; the phase
// estimator compares the turned sample with the constellation of the active scheme (QPSK:
// diagonals, BPSK: real axis) and gives the error theta_e; the loop filter H(z) = g/(1 - z^-1)
// integrates it, theta <- wrap(theta - g*theta_e), with g = 2^-kg (the error is scaled by 2^13 into
// Q3.29 phase units). With `enable` low theta is held at 0 and the block passes samples
// unrotated. Latency: 2 clocks; loop delay 4 clocks. The structure follows the document; the
// sign convention (the subtraction makes the loop settle for this phase shifter's direction of
// rotation), the wrapping of theta and the enable are this design's choices.
module phase_stabilizer
  import modem_pkg::*;
#(
  parameter int ACC_W = 32,
  parameter int FRAC  = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  psk_mode_e   mode,
  input  logic        enable,
  input  iq_t         din,
  input  logic [4:0]  kg,
  output iq_t         dout,
  output logic        out_valid,
  output phase_t      theta
);
  iq_t                    rot;
  logic                   rot_valid;
  logic signed [17:0]     e;
  logic                   e_valid;
  logic signed [ACC_W-1:0] ph;
  logic signed [ACC_W+1:0] ph_next;
  logic signed [ACC_W+1:0] step, ph_sub;

  phase_shifter u_shift (
    .clk(clk), .rst(rst), .in_valid(in_valid), .din(din), .theta(theta),
    .dout(rot), .out_valid(rot_valid)
  );

  phase_error_estimator u_ped (
    .clk(clk), .rst(rst), .in_valid(rot_valid), .mode(mode), .din(rot),
    .err(e), .out_valid(e_valid)
  );

  assign step   = ((ACC_W+2)'(e) <<< 13) >>> kg;
  assign ph_sub = (ACC_W+2)'(ph) - step;

  phase_wrapper #(.W(ACC_W+2), .FRAC(FRAC)) u_wrap (
    .din(ph_sub), .dout(ph_next)
  );

  always_ff @(posedge clk) begin
    if (rst || !enable) ph <= '0;
    else if (e_valid)   ph <= ph_next[ACC_W-1:0];
  end

  assign theta     = phase_t'(ph >>> FRAC);
  assign dout      = rot;
  assign out_valid = rot_valid;
endmodule
