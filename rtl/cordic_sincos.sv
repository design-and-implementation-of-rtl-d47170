// cordic_sincos: cosine and sine of a binary angle by CORDIC rotation.
//
// The angle is 16-bit two's complement with a full turn = 2^16 (-32768 = -pi). Angles beyond
// +-pi/2 are folded by a rotation of pi (outputs negated), then ITER rotation-mode iterations
// turn the vector (K*AMP, 0) towards the angle, K = 1/1.64676 being the CORDIC gain. The
// iterations are unrolled into one combinational stage with a register at the output, so
// results appear one clock after `in_valid` (out_valid marks them). Amplitude is AMP (default
// 32767, full range). This block stands in for the vendor CORDIC core named by the document;
// a synchronous active-high `rst` clears the outputs. Its structure (unrolled, 16 iterations, 20-bit angle path) is this design's own choice.
module cordic_sincos #(
  parameter int ITER = 16,
  parameter int AMP  = 32767
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               in_valid,
  input  logic signed [15:0] angle,
  output logic               out_valid,
  output logic signed [15:0] cos_o,
  output logic signed [15:0] sin_o
);
  // atan(2^-i) with a full turn = 2^20
  localparam int ATAN_TAB [16] = '{131072, 77376, 40884, 20753, 10417, 5213, 2607, 1304,
                                   652, 326, 163, 81, 41, 20, 10, 5};
  localparam int X0 = (AMP * 19898) / 32767;  // AMP / 1.64676

  logic        fold;
  logic signed [15:0] a_fold;
  logic signed [19:0] x_c, y_c, z_c;

  always_comb begin
    logic signed [19:0] x_n, y_n, z_n;
    fold   = (angle >= 16'sd16384) || (angle < -16'sd16384);
    a_fold = fold ? (angle ^ 16'sh8000) : angle;  // subtract pi modulo a turn
    x_c = 20'(X0);
    y_c = '0;
    z_c = {a_fold, 4'b0000};
    for (int i = 0; i < ITER; i++) begin
      if (z_c >= 0) begin
        x_n = x_c - (y_c >>> i);
        y_n = y_c + (x_c >>> i);
        z_n = z_c - 20'(ATAN_TAB[i]);
      end else begin
        x_n = x_c + (y_c >>> i);
        y_n = y_c - (x_c >>> i);
        z_n = z_c + 20'(ATAN_TAB[i]);
      end
      x_c = x_n;
      y_c = y_n;
      z_c = z_n;
    end
  end

  function automatic logic signed [15:0] clip(input logic signed [19:0] v, input logic neg);
    logic signed [20:0] w;
    w = neg ? -21'(v) : 21'(v);
    if (w > 21'sd32767)       return 16'sd32767;
    else if (w < -21'sd32767) return -16'sd32767;
    else                      return w[15:0];
  endfunction

  always_ff @(posedge clk) begin
    out_valid <= in_valid && !rst;
    if (rst) begin
      cos_o <= '0;
      sin_o <= '0;
    end else if (in_valid) begin
      cos_o <= clip(x_c, fold);
      sin_o <= clip(y_c, fold);
    end
  end
endmodule
