// noise_generator: approximately Gaussian white noise for the all-digital channel.
//
// NSUM independent 32-bit Galois LFSRs (maximal polynomial x^32+x^22+x^2+x+1, different seeds)
// are each advanced 16 steps per clock and give a uniform
// 16-bit value per clock; by the central limit theorem their sum is close
// to Gaussian. The sum is divided by NSUM and then attenuated by an arithmetic right shift of
// `atten` bits, which sets the noise power (each bit is -6 dB). With atten = 0 the standard
// deviation is about 18900/sqrt(NSUM) LSB. `enable` low forces the output to 0 (noise-free
// channel). Output is registered and changes every clock. The document only says that a white
// Gaussian noise generator and an attenuator set the SNR; the generator is this design's.
module noise_generator
  import modem_pkg::*;
#(
  parameter int NSUM = 4
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       enable,
  input  logic [3:0] atten,
  output sample_t    noise
);
  localparam logic [31:0] POLY = 32'h8020_0003;  // taps 31, 21, 1, 0
  logic [31:0] lf [NSUM];
  logic signed [23:0] sum;

  // 16 LFSR steps per clock, so successive outputs share no bits
  function automatic logic [31:0] adv16(input logic [31:0] s);
    logic [31:0] v;
    v = s;
    for (int n = 0; n < 16; n++) v = v[0] ? ((v >> 1) ^ POLY) : (v >> 1);
    return v;
  endfunction

  always_ff @(posedge clk) begin
    for (int k = 0; k < NSUM; k++) begin
      if (rst) lf[k] <= 32'h1234_5679 + 32'(k) * 32'h9E37_79B9;
      else     lf[k] <= adv16(lf[k]);
    end
  end

  always_comb begin
    sum = '0;
    for (int k = 0; k < NSUM; k++) sum = sum + 24'($signed(lf[k][31:16]));
  end

  always_ff @(posedge clk) begin
    if (rst || !enable) noise <= '0;
    else                noise <= sat16(48'(sum / NSUM) >>> atten);
  end
endmodule
