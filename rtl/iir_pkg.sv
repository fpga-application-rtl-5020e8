// iir_pkg: shared sizes and default coefficients of the FIR-based IIR filter.
//
// The filter works on 32-bit two's-complement samples (the width of the x and y
// pins of the top level). Coefficients are signed fixed-point numbers with FRAC
// fractional bits, so a coefficient value v is stored as round(v * 2**FRAC).
// The default coefficient set reuses the constants of the first-order look-ahead
// example (1, 3/4 and 9/16) for both the feed-forward and the feedback FIR, and a
// scaling factor of 1/4 keeps the loop gain below one (0.25 * 2.3125 = 0.578),
// so the default filter is stable. Lane count 3 and tap count 3 follow the
// three-input, three-tap parallel FIR that the architecture is built from; the
// coefficient word length, the fraction length and the scaling factor are this
// design's own choices.
package iir_pkg;

  localparam int unsigned DATA_W  = 32;  // sample width, x(31:0) / y(31:0)
  localparam int unsigned LANES   = 3;   // parallel inputs per block
  localparam int unsigned TAPS    = 3;   // taps of each parallel FIR
  localparam int unsigned COEF_W  = 16;  // coefficient word length
  localparam int unsigned FRAC    = 14;  // fractional bits of a coefficient

  typedef logic signed [COEF_W-1:0] coef_t;

  // 1.0, 0.75, 0.5625 in Q2.14
  localparam coef_t B_DEFAULT [TAPS] = '{16'sd16384, 16'sd12288, 16'sd9216};
  localparam coef_t A_DEFAULT [TAPS] = '{16'sd16384, 16'sd12288, 16'sd9216};
  // 0.25 in Q2.14
  localparam coef_t SCALE_DEFAULT = 16'sd4096;

endpackage
