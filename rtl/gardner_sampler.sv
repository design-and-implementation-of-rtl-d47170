// gardner_sampler: recovered-clock sampler that feeds the Gardner timing error detector.
//
// A Schmitt-level controller turns the DDS sine (nominally 4x the symbol rate) into a clean
// sampling clock: it goes to 0 when the sine is below L1 = -16384 (0xC000), to 1 when above
// L2 = +16384 (0x4000), and keeps its value in between, so the clock cannot chatter near zero
// and create false symbols. Rising edges of that clock drive a 2-bit counter: every edge that
// makes the counter odd (2x the symbol rate) shifts the complex input into a three-stage register
// (y[n], y[n-1], y[n-2], newest first); the edge that sets counter bit 1 (once per symbol) latches
// the three stages to the outputs and pulses `sym_strobe`. In BPSK the Q outputs are forced to 0.
// `sample_clk` is the symbol-rate clock (counter bit 1), brought out for capture. All edges are
// detected in the `clk` domain and act one clock later. The thresholds, the counter and the
// early/current/late register follow the document; giving y[n] (newest) as the symbol follows
// its block diagram. Sampling via enables instead of derived clocks is this design's choice.
module gardner_sampler
  import modem_pkg::*;
#(
  parameter int L1 = -16384,
  parameter int L2 = 16384
) (
  input  logic               clk,
  input  logic               rst,
  input  psk_mode_e          mode,
  input  iq_t                din,
  input  logic signed [15:0] dds_sig,
  output iq_t                y0,
  output iq_t                y1,
  output iq_t                y2,
  output logic               sym_strobe,
  output logic               sample_clk
);
  logic       schmitt, schmitt_d;
  logic [1:0] cnt;
  logic       edge_p;
  iq_t        s0, s1, s2;

  always_ff @(posedge clk) begin
    if (rst) schmitt <= 1'b0;
    else if (dds_sig < 16'(L1)) schmitt <= 1'b0;
    else if (dds_sig > 16'(L2)) schmitt <= 1'b1;
  end

  assign edge_p = schmitt && !schmitt_d;

  always_ff @(posedge clk) begin
    if (rst) begin
      schmitt_d  <= 1'b0;
      cnt        <= '0;
      s0         <= '0;
      s1         <= '0;
      s2         <= '0;
      y0         <= '0;
      y1         <= '0;
      y2         <= '0;
      sym_strobe <= 1'b0;
    end else begin
      schmitt_d  <= schmitt;
      sym_strobe <= 1'b0;
      if (edge_p) begin
        cnt <= cnt + 2'd1;
        if (!cnt[0]) begin              // counter becomes odd: 2x symbol-rate sample
          s0 <= din;
          s1 <= s0;
          s2 <= s1;
        end
        if (cnt == 2'd1) begin          // counter bit 1 rises: symbol-rate latch
          sym_strobe <= 1'b1;
          y0.i <= s0.i;
          y1.i <= s1.i;
          y2.i <= s2.i;
          y0.q <= (mode == MODE_QPSK) ? s0.q : '0;
          y1.q <= (mode == MODE_QPSK) ? s1.q : '0;
          y2.q <= (mode == MODE_QPSK) ? s2.q : '0;
        end
      end
    end
  end

  assign sample_clk = cnt[1];
endmodule
