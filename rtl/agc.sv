// agc: automatic gain control for the receiver's analog gain stage.
//
// The RMS level estimator averages x^2 over about 2^avg_shift samples (leaky integrator) and takes
// its integer square root. The error e = level - desired_level goes to a three-state decision:
// f(e) = g1 for e <= -delta_l (signal too weak: raise the gain slowly), g2 for e >= +delta_l (too
// strong: lower the gain fast) and 0 inside the dead zone, with g1 = 2^-s1 << g2 = 2^-s2. The gain
// accumulator then steps gain <- gain - f(e)*e, clamped to [0, GAIN_MAX]. `gain` is an unsigned
// Q8.8 code (256 = unity) for the analog gain stage ahead of the ADC. Updates happen on each
// in_valid sample; the level and error outputs are registered. The document runs this loop in
// host software and names its parts (RMS level estimator, decision block, accumulator); the
// averaging, the square root, the widths and the gain code are this design's.
module agc
  import modem_pkg::*;
#(
  parameter int GAIN_MAX = 65535,
  parameter int GAIN_RST = 256
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  sample_t     din,
  input  logic [15:0] desired_level,
  input  logic [15:0] delta_l,
  input  logic [4:0]  s1,
  input  logic [4:0]  s2,
  input  logic [4:0]  avg_shift,
  output logic [15:0] gain,
  output logic [15:0] level,
  output logic signed [16:0] err
);
  logic [31:0] ms;          // mean square, 2^0 units
  logic [31:0] sq;
  logic [15:0] rms_c;
  logic signed [33:0] ms_diff;
  logic signed [31:0] g_acc;   // gain with 8 extra fractional bits
  logic signed [31:0] step;
  logic signed [32:0] g_next;

  assign sq      = 32'($signed(din) * $signed(din));
  assign ms_diff = $signed({2'b00, sq}) - $signed({2'b00, ms});

  // bitwise integer square root of ms
  function automatic logic [15:0] isqrt(input logic [31:0] v);
    logic [31:0] rem, root, trial;
    rem  = v;
    root = '0;
    for (int b = 15; b >= 0; b--) begin
      trial = root | (32'd1 << (2 * b));
      if (rem >= trial) begin
        rem  = rem - trial;
        root = (root >> 1) | (32'd1 << (2 * b));
      end else begin
        root = root >> 1;
      end
    end
    return root[15:0];
  endfunction

  assign rms_c = isqrt(ms);

  always_comb begin
    if (err <= -$signed({1'b0, delta_l}))     step = (32'(err) <<< 8) >>> s1;
    else if (err >= $signed({1'b0, delta_l})) step = (32'(err) <<< 8) >>> s2;
    else                                      step = '0;
    g_next = 33'(g_acc) - 33'(step);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ms    <= '0;
      level <= '0;
      err   <= '0;
      g_acc <= 32'(GAIN_RST) <<< 8;
    end else if (in_valid) begin
      ms    <= 32'($signed({2'b00, ms}) + (ms_diff >>> avg_shift));
      level <= rms_c;
      err   <= $signed({1'b0, rms_c}) - $signed({1'b0, desired_level});
      if (g_next < 0)                            g_acc <= '0;
      else if (g_next > (33'(GAIN_MAX) <<< 8))   g_acc <= 32'(GAIN_MAX) <<< 8;
      else                                       g_acc <= g_next[31:0];
    end
  end

  assign gain = g_acc[23:8];
endmodule
