// shaping_filter: bank of raised-cosine pulse-shaping FIRs for the complex NRZ stream.
//
// A direct-form FIR of NTAPS = SPAN*SPS + 1 taps filters I and Q each clock `in_valid` is high.
// Its coefficients come from a bank of three raised-cosine responses with roll-off BETA (0.25, as
// the document chooses), one per data rate, selected by `rate_sel`: 0 = SPS samples per symbol
// (24: 5 Msym/s at 120 MHz), 1 = SPS1 (20: 6 Msym/s), 2 and 3 = SPS2 (12: 10 Msym/s). Each
// response spans SPAN symbols at its own rate, is zero-padded to NTAPS around the same centre tap
// (so every entry has the same group delay), and is computed at elaboration from
// modem_pkg::rc_impulse and scaled to unity DC gain (taps sum to about 2^15): a long run of equal
// NRZ levels passes at its own amplitude and the edges between them are smoothed. With `bypass`
// high the input is passed unshaped through the same one-clock output register. Latency: 1 clock
// when bypassed, (NTAPS-1)/2 + 1 clocks of group delay when shaping. rate_sel may change at any
// time; the output is then a mix of the two responses for one filter length. The document selects
// a filter of its bank by data rate; the bank's rates, the span and the zero padding are this
// design's choices, and a 1 Msym/s entry (120 samples per symbol, 481 taps) is not included.
module shaping_filter
  import modem_pkg::*;
#(
  parameter int  SPS   = 24,
  parameter int  SPS1  = 20,
  parameter int  SPS2  = 12,
  parameter int  SPAN  = 4,
  parameter real BETA  = 0.25,
  parameter int  NTAPS = SPAN * SPS + 1
) (
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  input  logic bypass,
  input  logic [1:0] rate_sel,
  input  iq_t  din,
  output iq_t  dout,
  output logic out_valid
);
  typedef logic signed [17:0] coef_t;

  typedef coef_t coef_arr_t [NTAPS];

  // taps for `sps` samples per symbol, zero outside SPAN symbols, scaled to sum to about 2^15
  function automatic coef_arr_t gen_taps(input int sps);
    coef_arr_t t;
    real h [NTAPS];
    real sum;
    int k;
    sum = 0.0;
    for (int n = 0; n < NTAPS; n++) begin
      k = n - (NTAPS - 1) / 2;
      if (2 * k > SPAN * sps || -2 * k > SPAN * sps) h[n] = 0.0;
      else h[n] = rc_impulse(k, sps, BETA);
      sum  = sum + h[n];
    end
    for (int n = 0; n < NTAPS; n++) t[n] = coef_t'(int'(h[n] * 32768.0 / sum));
    return t;
  endfunction

  localparam coef_arr_t TAPS0 = gen_taps(SPS);
  localparam coef_arr_t TAPS1 = gen_taps(SPS1);
  localparam coef_arr_t TAPS2 = gen_taps(SPS2);

  coef_arr_t taps;
  always_comb begin
    for (int n = 0; n < NTAPS; n++) begin
      case (rate_sel)
        2'd0:    taps[n] = TAPS0[n];
        2'd1:    taps[n] = TAPS1[n];
        default: taps[n] = TAPS2[n];
      endcase
    end
  end

  sample_t dl_i [NTAPS];
  sample_t dl_q [NTAPS];
  logic signed [47:0] acc_i, acc_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int n = 0; n < NTAPS; n++) begin
        dl_i[n] <= '0;
        dl_q[n] <= '0;
      end
    end else if (in_valid) begin
      dl_i[0] <= din.i;
      dl_q[0] <= din.q;
      for (int n = 1; n < NTAPS; n++) begin
        dl_i[n] <= dl_i[n-1];
        dl_q[n] <= dl_q[n-1];
      end
    end
  end

  always_comb begin
    acc_i = '0;
    acc_q = '0;
    for (int n = 0; n < NTAPS; n++) begin
      acc_i = acc_i + 48'(dl_i[n]) * 48'(taps[n]);
      acc_q = acc_q + 48'(dl_q[n]) * 48'(taps[n]);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      dout      <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        if (bypass) dout <= din;
        else begin
          dout.i <= sat16(acc_i >>> 15);
          dout.q <= sat16(acc_q >>> 15);
        end
      end
    end
  end
endmodule
