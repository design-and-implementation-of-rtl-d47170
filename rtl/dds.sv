// dds: direct digital synthesizer with frequency and phase inputs.
//
// A 32-bit phase accumulator advances by `freq_word` every clock (f_out = freq_word * f_clk /
// 2^32). The top 16 bits plus the 16-bit `phase_off` (binary angle, a full turn = 2^16) address
// a CORDIC that returns cos and sin at full 16-bit range. Outputs are valid from the second clock
// after reset and are refreshed every clock; the latency from a `phase_off` change to the output
// is one clock. The document takes its DDS from a vendor core and gives only its inputs
// (frequency, phase) and 16-bit output; the accumulator width and the CORDIC are this design's.
module dds #(
  parameter int ACC_W = 32
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [ACC_W-1:0]   freq_word,
  input  logic signed [15:0] phase_off,
  output logic               out_valid,
  output logic signed [15:0] cos_o,
  output logic signed [15:0] sin_o
);
  logic [ACC_W-1:0] acc;
  logic signed [15:0] angle;

  always_ff @(posedge clk) begin
    if (rst) acc <= '0;
    else     acc <= acc + freq_word;
  end

  assign angle = $signed(acc[ACC_W-1 -: 16]) + phase_off;

  cordic_sincos u_cordic (
    .clk      (clk),
    .rst      (rst),
    .in_valid (1'b1),
    .angle    (angle),
    .out_valid(out_valid),
    .cos_o    (cos_o),
    .sin_o    (sin_o)
  );
endmodule
