// gardner_ted: Gardner timing error detector.
//
// e = (y[n-2] - y[n]) * y[n-1] for the I branch plus the same for the Q branch (the Q inputs are
// zero in BPSK), where y[n] and y[n-2] are successive symbol samples and y[n-1] the sample
// half-way between them. e is zero when the middle sample sits on the zero crossing of a symbol
// transition; it is negative when sampling is late and positive when early, for rising and
// falling transitions alike (the difference and the middle sample change sign together).
// The product is scaled by 2^-15. Output registered: 1 clock after in_valid. The equation follows
// the document; the scaling is this design's.
module gardner_ted
  import modem_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  input  iq_t  y0,
  input  iq_t  y1,
  input  iq_t  y2,
  output logic signed [19:0] err,
  output logic out_valid
);
  logic signed [35:0] ei, eq, es;
  always_comb begin
    ei = 36'(18'(y2.i) - 18'(y0.i)) * 36'(y1.i);
    eq = 36'(18'(y2.q) - 18'(y0.q)) * 36'(y1.q);
    es = (ei + eq) >>> 15;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      err       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) err <= es[19:0];
    end
  end
endmodule
