// ddc: digital down-converter, real IF samples to complex baseband.
//
// A DDS at `freq_word` (f_IF = freq_word * f_clk / 2^32) gives cos and sin; the mixers form
// I = x*cos and Q = -x*sin, each scaled by 2^-13 so that a signal made by the matching
// up-converter returns at its original baseband amplitude. Each branch then passes a moving-average
// low-pass filter of LPF_LEN samples (a power of two; it nulls the sum-frequency image when that
// falls on a multiple of f_clk/LPF_LEN) and is down-sampled by DEC. `out_valid` marks each output
// sample. Any difference between f_IF and the carrier remains as a rotation of the output at the
// difference frequency, which the carrier recovery removes. Latency: 3 clocks plus the filter's
// (LPF_LEN-1)/2 group delay. The document gives the DDS-mixer-LPF-down-sampler structure and the
// 16-bit I/Q format; the filter type, its length and the scaling are this design's.
module ddc
  import modem_pkg::*;
#(
  parameter int LPF_LEN = 8,
  parameter int DEC     = 1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  sample_t     din,
  input  logic [31:0] freq_word,
  output iq_t         dout,
  output logic        out_valid
);
  localparam int LG = $clog2(LPF_LEN);
  localparam int DW = (DEC > 1) ? $clog2(DEC) : 1;

  logic               lo_valid;
  logic signed [15:0] lo_cos, lo_sin;
  logic signed [23:0] mi, mq;
  logic signed [23:0] hist_i [LPF_LEN];
  logic signed [23:0] hist_q [LPF_LEN];
  logic signed [31:0] sum_i, sum_q;
  logic               mix_valid;
  logic [DW-1:0]      dcnt;

  dds u_dds (
    .clk(clk), .rst(rst), .freq_word(freq_word), .phase_off(16'sd0),
    .out_valid(lo_valid), .cos_o(lo_cos), .sin_o(lo_sin)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      mi        <= '0;
      mq        <= '0;
      mix_valid <= 1'b0;
    end else begin
      mix_valid <= in_valid && lo_valid;
      if (in_valid) begin
        mi <= 24'((32'(din) * 32'(lo_cos)) >>> 13);
        mq <= 24'(-((32'(din) * 32'(lo_sin)) >>> 13));
      end
    end
  end

  // running sum over the last LPF_LEN products
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int n = 0; n < LPF_LEN; n++) begin
        hist_i[n] <= '0;
        hist_q[n] <= '0;
      end
      sum_i <= '0;
      sum_q <= '0;
    end else if (mix_valid) begin
      hist_i[0] <= mi;
      hist_q[0] <= mq;
      for (int n = 1; n < LPF_LEN; n++) begin
        hist_i[n] <= hist_i[n-1];
        hist_q[n] <= hist_q[n-1];
      end
      sum_i <= sum_i + 32'(mi) - 32'(hist_i[LPF_LEN-1]);
      sum_q <= sum_q + 32'(mq) - 32'(hist_q[LPF_LEN-1]);
    end
  end

  logic sum_valid;
  always_ff @(posedge clk) begin
    if (rst) begin
      sum_valid <= 1'b0;
      dcnt      <= '0;
      dout      <= '0;
      out_valid <= 1'b0;
    end else begin
      sum_valid <= mix_valid;
      out_valid <= 1'b0;
      if (sum_valid) begin
        if (DEC <= 1 || dcnt == DW'(DEC - 1)) begin
          dcnt      <= '0;
          out_valid <= 1'b1;
          dout.i    <= sat16(48'(sum_i >>> LG));
          dout.q    <= sat16(48'(sum_q >>> LG));
        end else begin
          dcnt <= dcnt + 1'b1;
        end
      end
    end
  end
endmodule
