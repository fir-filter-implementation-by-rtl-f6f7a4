// fir_hv_pkg: constants shared by the FIR filters built from shared
// horizontal and vertical common subexpressions: the 15-tap raised cosine
// filter and the 26-tap Parks-McClellan low-pass filter.
//
// The filter coefficients are 12-bit canonic signed digit (CSD) fractions,
// digit weights 2^-1 .. 2^-12. The datapath keeps every product exactly by
// working on the input scaled by 2^COEF_FRAC, so a term "x >> s" of the
// filter equation becomes "x << (COEF_FRAC - s)" here and nothing is
// truncated. The output is therefore y * 2^12 as an integer.
//
// The sum of the coefficient magnitudes is 5998 / 4096 < 2, so a signed
// result needs GROWTH = 13 bits more than the input. The 16-bit input width
// is this design's own choice; the coefficient format and scale follow the
// filter's specification.
package fir_hv_pkg;

  // Default input sample width (two's complement).
  localparam int unsigned DEF_W_IN = 16;

  // Fractional bits of the CSD coefficients (digits 2^-1 .. 2^-12).
  localparam int unsigned COEF_FRAC = 12;

  // Extra output bits: sum |h(k)| * 2^12 = 5998 < 2^13.
  localparam int unsigned GROWTH = 13;

  // Number of taps.
  localparam int unsigned N_TAPS = 15;

  // Horizontal subexpressions are carried scaled by 4 (2 guard bits) so
  // that the ">> 2" inside them is exact.
  localparam int unsigned H_GUARD = 2;

  // 26-tap Parks-McClellan filter (second design): 8-bit CSD coefficients
  // (digit weights 2^-1 .. 2^-8); sum |h(k)| * 2^8 = 420 < 2^9.
  localparam int unsigned EX1_COEF_FRAC = 8;
  localparam int unsigned EX1_GROWTH    = 9;
  localparam int unsigned EX1_N_TAPS    = 26;

  // The same filter with 16-bit CSD coefficients: sum |h(k)| * 2^16 =
  // 110914 < 2^17.
  localparam int unsigned EX1W_COEF_FRAC = 16;
  localparam int unsigned EX1W_GROWTH    = 17;

  // Output word growth of the 26-tap filter for a coefficient wordlength.
  function automatic int unsigned ex1_growth(int unsigned coef_bits);
    return (coef_bits == EX1W_COEF_FRAC) ? EX1W_GROWTH : EX1_GROWTH;
  endfunction

endpackage
