// modem_pkg: types, constants and constant functions shared by the BPSK/QPSK modem.
//
// Sample format: 16-bit two's complement, full range [-32768, 32767], as used throughout the
// modem datapath. Phase format: radians in signed Q3.13 (pi = 25735, the fixed-point pi of the
// phase wrapper), optionally extended by extra fractional bits inside loop accumulators.
// Binary angles (a full turn = 2^16) are used between a DDS and the CORDIC.
// The raised-cosine impulse function evaluates the textbook raised-cosine impulse response with a
// small in-house sine series, so the taps are computed at elaboration and need no table file.
package modem_pkg;

  localparam int SAMPLE_W = 16;
  localparam int PHASE_W  = 16;
  // pi in Q3.13 radians: 3.1414794921875 = 25735 / 8192
  localparam logic signed [PHASE_W-1:0] PI_Q13 = 16'sd25735;
  // radians (Q3.13) to binary angle (2^16 per turn): multiply by 2^16/(2*pi*8192) = 41722/32768
  localparam int RAD2BANG_MUL = 41722;

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [PHASE_W-1:0]  phase_t;

  typedef struct packed {
    sample_t i;
    sample_t q;
  } iq_t;

  typedef enum logic {
    MODE_BPSK = 1'b0,
    MODE_QPSK = 1'b1
  } psk_mode_e;

  // Saturate a wide signed value to 16 bits.
  function automatic sample_t sat16(input logic signed [47:0] v);
    if (v > 48'sd32767)       return 16'sd32767;
    else if (v < -48'sd32768) return -16'sd32768;
    else                      return sample_t'(v);
  endfunction

  // Sine by range reduction and a Taylor series (elaboration-time use only).
  function automatic real rsin(input real x);
    real pi, y, term, acc;
    pi = 3.14159265358979323846;
    y  = x;
    while (y >  pi) y = y - 2.0 * pi;
    while (y < -pi) y = y + 2.0 * pi;
    term = y;
    acc  = y;
    for (int n = 1; n < 14; n++) begin
      term = -term * y * y / ((2.0 * n) * (2.0 * n + 1.0));
      acc  = acc + term;
    end
    return acc;
  endfunction

  function automatic real rcos(input real x);
    return rsin(x + 3.14159265358979323846 / 2.0);
  endfunction

  // Raised-cosine impulse response at t = k/sps symbol periods, roll-off beta (unnormalised).
  function automatic real rc_impulse(input int k, input int sps, input real beta);
    real pi, t, sinc, den;
    pi = 3.14159265358979323846;
    t  = real'(k) / real'(sps);
    if (k == 0) sinc = 1.0;
    else        sinc = rsin(pi * t) / (pi * t);
    den = 1.0 - (2.0 * beta * t) * (2.0 * beta * t);
    if (den < 1.0e-9 && den > -1.0e-9)
      return (pi / 4.0) * rsin(pi / (2.0 * beta)) / (pi / (2.0 * beta));
    return sinc * rcos(pi * beta * t) / den;
  endfunction

endpackage
