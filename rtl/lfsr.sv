// lfsr: 10-bit Fibonacci linear feedback shift register, feedback polynomial x^9 + x^6 + 1
// (taps on register bits 9 and 6), giving a 1023-bit maximal-length pseudo-random bit stream.
//
// Each step shifts the register one place towards bit 9 and writes bit9 XOR bit6 into bit 0;
// the output bit is bit 0 (the rightmost bit), as in the data generator of the modem.
// Interface: `rst` (synchronous, active high) loads `seed`; `step` is the external bit clock,
// given here as a one-cycle enable in the `clk` domain; `bit_out` and `state` change on the
// clock edge after a step. A zero seed locks the register at zero (choose a non-zero seed).
// Loading the seed on reset follows the document; making the bit clock an enable of the system
// clock, rather than a separate derived clock, is this design's choice.
module lfsr #(
  parameter int WIDTH = 10,
  parameter int TAP_A = 9,
  parameter int TAP_B = 6
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             step,
  input  logic [WIDTH-1:0] seed,
  output logic             bit_out,
  output logic [WIDTH-1:0] state
);
  always_ff @(posedge clk) begin
    if (rst) state <= seed;
    else if (step) state <= {state[WIDTH-2:0], state[TAP_A] ^ state[TAP_B]};
  end
  assign bit_out = state[0];
endmodule
