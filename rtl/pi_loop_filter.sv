// pi_loop_filter: proportional-integral loop filter with shift gains.
//
// out = g_p*x + acc, acc <- acc + g_i*x, where the input is first scaled up by 2^FRAC and
// g_p = 2^-kp, g_i = 2^-ki are applied by arithmetic right shifts. The accumulator is the z^-1 in
// the integrator's feedback, so the integral term of `out` holds the inputs before the current
// one. Both the accumulator and `out` update on in_valid, `out` one clock after its input
// (out_valid). With SAT set the accumulator and output saturate at the W-bit range; with SAT
// clear they wrap modulo 2^W, which suits a loop whose output is a phase. The PI structure and shift-applied
// gains follow the document; the widths and saturation are this design's.
module pi_loop_filter #(
  parameter int W_IN = 18,
  parameter int W    = 32,
  parameter int FRAC = 13,
  parameter bit SAT  = 1'b1
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   in_valid,
  input  logic signed [W_IN-1:0] din,
  input  logic [4:0]             kp,
  input  logic [4:0]             ki,
  output logic signed [W-1:0]    dout,
  output logic signed [W-1:0]    integ,
  output logic                   out_valid
);
  localparam logic signed [W+1:0] MAXV = (W+2)'({1'b0, {(W-1){1'b1}}});
  logic signed [W+1:0] x_s, p_t, i_t, a_n, o_n;

  function automatic logic signed [W-1:0] satw(input logic signed [W+1:0] v);
    if (!SAT)           return v[W-1:0];
    else if (v > MAXV)       return MAXV[W-1:0];
    else if (v < -MAXV) return -MAXV[W-1:0];
    else                return v[W-1:0];
  endfunction

  always_comb begin
    x_s = (W+2)'(din) <<< FRAC;
    p_t = x_s >>> kp;
    i_t = x_s >>> ki;
    a_n = (W+2)'(integ) + i_t;
    o_n = (W+2)'(integ) + p_t;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      integ     <= '0;
      dout      <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        integ <= satw(a_n);
        dout  <= satw(o_n);
      end
    end
  end
endmodule
