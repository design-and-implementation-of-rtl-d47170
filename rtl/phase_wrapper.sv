// phase_wrapper: keeps a phase in radians inside [-pi, pi].
//
// y = x for |x| <= pi, x - 2*pi for x > pi, x + 2*pi for x < -pi (one correction, so the input
// must lie within (-3*pi, 3*pi)). The phase is signed fixed point with FRAC fractional bits
// beyond Q3.13; pi is the Q3.13 constant 25735 (3.1414794921875) scaled by 2^FRAC.
// Purely combinational. The equation and the constant follow the document.
module phase_wrapper
  import modem_pkg::*;
#(
  parameter int W    = 32,
  parameter int FRAC = 16
) (
  input  logic signed [W-1:0] din,
  output logic signed [W-1:0] dout
);
  localparam logic signed [W+1:0] PI_W = (W+2)'(PI_Q13) <<< FRAC;
  logic signed [W+1:0] x;
  always_comb begin
    x = (W+2)'(din);
    if (x > PI_W)       dout = W'(x - 2 * PI_W);
    else if (x < -PI_W) dout = W'(x + 2 * PI_W);
    else                dout = din;
  end
endmodule
