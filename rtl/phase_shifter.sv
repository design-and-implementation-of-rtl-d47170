// phase_shifter: rotates a complex sample by a phase, y = x * exp(j*theta).
//
// theta is in Q3.13 radians; it is converted to a binary angle (x 2^16/(2*pi)) and a CORDIC gives
// cos(theta) and sin(theta). The input sample is delayed to meet them, a complex multiplier forms
// I' = I*cos - Q*sin and Q' = I*sin + Q*cos, and a format converter rounds the products back to
// 16 bits (shift by 15, saturate). Latency: 2 clocks from din/theta to dout; out_valid follows
// in_valid. The structure (CORDIC sin/cos, complex multiplier, format conversion) follows the
// document; the widths and the rounding are this design's.
module phase_shifter
  import modem_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   in_valid,
  input  iq_t    din,
  input  phase_t theta,
  output iq_t    dout,
  output logic   out_valid
);
  logic signed [31:0] bang_w;
  logic signed [15:0] bang;
  logic               cs_valid;
  logic signed [15:0] c, s;
  iq_t                x_d;
  logic signed [47:0] pi_, pq_;

  assign bang_w = (32'(theta) * 32'(RAD2BANG_MUL)) >>> 15;
  assign bang   = bang_w[15:0];

  cordic_sincos u_cordic (
    .clk(clk), .rst(rst), .in_valid(in_valid), .angle(bang),
    .out_valid(cs_valid), .cos_o(c), .sin_o(s)
  );

  always_ff @(posedge clk) begin
    if (rst)           x_d <= '0;
    else if (in_valid) x_d <= din;
  end

  assign pi_ = 48'(x_d.i) * 48'(c) - 48'(x_d.q) * 48'(s);
  assign pq_ = 48'(x_d.i) * 48'(s) + 48'(x_d.q) * 48'(c);

  always_ff @(posedge clk) begin
    if (rst) begin
      dout      <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= cs_valid;
      if (cs_valid) begin
        dout.i <= sat16((pi_ + 48'sd16384) >>> 15);
        dout.q <= sat16((pq_ + 48'sd16384) >>> 15);
      end
    end
  end
endmodule
