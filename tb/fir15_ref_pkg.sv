// fir15_ref_pkg: reference model of the 15-tap raised cosine filter for the
// testbenches. The coefficients are rebuilt here from their 12-bit CSD digit
// lists (digit position p has weight 2^-p, n = -1), independently of how the
// RTL shares subexpressions, and scaled by 2^12:
//   h(0) = 2^-5 - 2^-7 + 2^-10 + 2^-12
//   h(2) = 2^-4 - 2^-6 + 2^-11
//   h(4) = 2^-3 - 2^-5 + 2^-9 - 2^-12
//   h(6) = 2^-2 + 2^-4 + 2^-9 + 2^-12
//   h(7) = 2^-1
// with h(14-k) = h(k) and the odd taps 1..13 zero. With true_signs set,
// h(0), h(4), h(10) and h(14) are negated, as in the actual raised cosine
// impulse response (sampled at half-symbol spacing, taps 4 and 0 fall in
// its first and second negative lobes).
package fir15_ref_pkg;

  localparam int N = 15;

  // Signed digit positions of one coefficient: +p for a 1, -p for an n.
  function automatic int csd_value(input int digits[4]);
    int v = 0;
    foreach (digits[i]) begin
      if (digits[i] > 0) v += 1 << (12 - digits[i]);
      else if (digits[i] < 0) v -= 1 << (12 + digits[i]);
    end
    return v;
  endfunction

  function automatic int coef(input int k, input bit true_signs = 1'b0);
    int m = (k > 7) ? 14 - k : k;
    int sgn = true_signs ? -1 : 1;
    case (m)
      0: return sgn * csd_value('{5, -7, 10, 12});
      2: return csd_value('{4, -6, 11, 0});
      4: return sgn * csd_value('{3, -5, 9, -12});
      6: return csd_value('{2, 4, 9, 12});
      7: return csd_value('{1, 0, 0, 0});
      default: return 0;
    endcase
  endfunction

endpackage
