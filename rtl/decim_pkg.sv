// decim_pkg: constants shared by the variable-latency adder and the
// CIC / half-band decimation chain.
//
// The chain turns a 19.2 kHz sigma-delta bit stream into 300 Hz words:
// CIC (order 3, rate change 16, differential delay 1) to 1.2 kHz, then two
// half-band decimators (x2 each) to 600 Hz and 300 Hz.  These figures follow
// the source description.  The second half-band filter has 45 taps of which
// 23 are non-zero, as described.  The first half-band filter's length is not
// specified; 11 taps (7 non-zero) is this design's choice.
//
// Coefficients are Q1.15 (value / 32768) and come from a windowed ideal
// half-band response, which is this design's choice:
//   h[n] = 0.5 * sinc((n - c) / 2) * w[n],   c = (TAPS - 1) / 2,
//   sinc(x) = sin(pi x) / (pi x), rounded to the nearest integer after x 32768,
//   taps at an even non-zero distance from the centre forced to 0.
// HB1 (11 taps) uses a Hamming window  w[n] = 0.54 - 0.46 cos(2 pi n / (TAPS-1)),
// HB2 (45 taps) a Blackman window      w[n] = 0.42 - 0.5 cos(2 pi n / (TAPS-1))
//                                             + 0.08 cos(4 pi n / (TAPS-1)).
package decim_pkg;

  // Width of every VL carry-select adder in the design (source: 64-bit VL-CSA).
  localparam int unsigned ADD_W = 64;

  // Coefficient format.
  localparam int unsigned COEF_W    = 16;
  localparam int unsigned COEF_FRAC = 15;

  typedef logic signed [COEF_W-1:0] coef_t;

  localparam int unsigned HB1_TAPS = 11;
  localparam int unsigned HB2_TAPS = 45;

  localparam coef_t HB1_COEF [HB1_TAPS] = '{
    16'sd167, 16'sd0, -16'sd1383, 16'sd0, 16'sd9514, 16'sd16384,
    16'sd9514, 16'sd0, -16'sd1383, 16'sd0, 16'sd167
  };

  localparam coef_t HB2_COEF [HB2_TAPS] = '{
    16'sd0,     16'sd1,    16'sd0,  -16'sd10,   16'sd0,   16'sd33,    16'sd0,  -16'sd81,
    16'sd0,     16'sd170,  16'sd0,  -16'sd322,  16'sd0,   16'sd572,   16'sd0,  -16'sd979,
    16'sd0,     16'sd1688, 16'sd0,  -16'sd3224, 16'sd0,   16'sd10343, 16'sd16384,
    16'sd10343, 16'sd0,   -16'sd3224, 16'sd0,   16'sd1688, 16'sd0,   -16'sd979, 16'sd0,
    16'sd572,   16'sd0,   -16'sd322, 16'sd0,    16'sd170,  16'sd0,   -16'sd81,  16'sd0,
    16'sd33,    16'sd0,   -16'sd10,  16'sd0,    16'sd1,    16'sd0
  };

endpackage
