// fir26_ref_pkg: reference model of the 26-tap Parks-McClellan low-pass
// filter for the testbenches. Coefficients are derived from the real-valued
// design h(0..12) (h(25-k) = h(k)) as sign(h) * floor(|h| * 2^8), with no
// use of the CSD digits or of how the RTL shares them.
package fir26_ref_pkg;

  localparam int N = 26;

  localparam real H_REAL [13] = '{
    -0.00933078669575,  0.07628237421426,  0.03135623682714,
     0.01374432164657, -0.00948598843682, -0.03358586396879,
    -0.04680063247432, -0.03819695824263, -0.00271831937636,
     0.05563093697248,  0.12420551537587,  0.18473033065671,
     0.22024453765020
  };

  function automatic int coef(input int k, input int bits = 8);
    int  m = (k > 12) ? 25 - k : k;
    real h = H_REAL[m];
    int  mag = $rtoi((h < 0.0 ? -h : h) * real'(1 << bits));
    return (h < 0.0) ? -mag : mag;
  endfunction

endpackage
