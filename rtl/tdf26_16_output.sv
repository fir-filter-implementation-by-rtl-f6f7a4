// tdf26_16_output: tap products and transposed direct form adder line of
// the 26-tap Parks-McClellan low-pass filter (pass band edge 0.2*pi, stop
// band edge 0.25*pi) with 16-bit CSD coefficients.
//
// Coefficients h(k) * 2^16 (h(25-k) = h(k)), magnitudes truncated to 16
// fractional bits, signs kept:
//   h0 = -611   h1 = 4999   h2 = 2054   h3 = 900    h4 = -621
//   h5 = -2201  h6 = -3067  h7 = -2503  h8 = -178   h9 = 3645
//   h10 = 8139  h11 = 12106 h12 = 14433
// Their 120 nonzero CSD digits are covered by
//   horizontal patterns (hcse4_gen): 50 pairs of kind 101, 10n and 100n,
//     chosen per coefficient to take out as many pairs as possible;
//   vertical patterns (vcse26_gen) among the digits left over:
//     x + x[-4] for column 7 (taps 0/4 and 21/25) and
//     x - x[-3] for column 5 (taps 2/5 and 20/23);
//   12 single digits.
// That leaves 66 terms, summed by 65 adders below; with the 3 horizontal
// and 2 vertical subexpression adders the filter needs 70. Each line names
// its terms: "10n at 2^-9" is a 10n pattern whose upper digit has weight
// 2^-9, used as s10n << (16 - 9 - 2); "col p" is a vertical pattern in
// column p; a bare 2^-p is a single digit. Pattern values (s101 = 5x,
// s10n = 3x, s100n = 7x) are aligned to their lower digit. The top tap
// (25) has only negative terms, so z[25] holds the negated partial sum and
// the adder at tap 24 subtracts it, avoiding a negation.
//
// All values are integers scaled by 2^16: y_out = sum(h(k) * x(n-k)) exactly,
// W_IN + 17 bits (sum |h(k)| * 2^16 = 110914 < 2^17). Interface and timing are
// those of tdf26_output: on a clock with en high the chain advances one
// sample and y_out takes the output for the sample presented; out_valid
// flags it one clock later; rst_n clears the chain synchronously.
//
// The coefficient values and the pattern kinds follow the filter's
// specification; the assignment of digits to patterns (a maximum horizontal
// pairing per coefficient, then vertical pairing down each column) is this
// design's own.
module tdf26_16_output
  import fir_hv_pkg::*;
#(
  parameter int unsigned W_IN = DEF_W_IN,
  parameter int unsigned W_OUT = W_IN + EX1W_GROWTH
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic signed [W_IN-1:0] x1,
  input  logic signed [W_IN+3:0] s101,
  input  logic signed [W_IN+3:0] s10n,
  input  logic signed [W_IN+3:0] s100n,
  input  logic signed [W_IN:0]   v10001,
  input  logic signed [W_IN:0]   v100n,
  output logic                   out_valid,
  output logic signed [W_OUT-1:0] y_out
);

  typedef logic signed [W_OUT-1:0] acc_t;

  localparam int unsigned TOP = EX1_N_TAPS - 1;   // highest tap (25)

  acc_t x, a101, a10n, a100n, va, vb;
  acc_t z  [1:TOP];
  acc_t zn [1:TOP];
  acc_t y_next;

  always_comb begin
    x     = acc_t'(x1);
    a101  = acc_t'(s101);
    a10n  = acc_t'(s10n);
    a100n = acc_t'(s100n);
    va    = acc_t'(v10001);
    vb    = acc_t'(v100n);

    zn[25] = (a10n <<< 5) + a10n;                                        // 10n at 2^-9, 10n at 2^-14  (held negated)
    zn[24] = (a100n <<< 7) + a100n + (x <<< 12) - z[25];                 // 100n at 2^-6, 100n at 2^-13, 2^-4
    zn[23] = z[24] + (a10n <<< 1);                                       // 10n at 2^-13
    zn[22] = z[23] + (a100n <<< 7) + (x <<< 2);                          // 100n at 2^-6, 2^-14
    zn[21] = z[22] + a10n - (a100n <<< 4) - (va <<< 9);                  // 10n at 2^-14, 100n at 2^-9, 10001 col 7
    zn[20] = z[21] + a100n - (a101 <<< 5) - (vb <<< 11);                 // 100n at 2^-13, 101 at 2^-9, 100n col 5
    zn[19] = z[20] + a101 - (a10n <<< 10);                               // 101 at 2^-14, 10n at 2^-4
    zn[18] = z[19] - (a100n <<< 6) - a100n - (x <<< 11);                 // 100n at 2^-7, 100n at 2^-13, 2^-5
    zn[17] = z[18] + (a100n <<< 1) - (a10n <<< 6);                       // 100n at 2^-12, 10n at 2^-8
    zn[16] = z[17] + (x <<< 12) - (a100n <<< 6) - a10n;                  // 2^-4, 100n at 2^-7, 10n at 2^-14
    zn[15] = z[16] + (x <<< 13) - (a10n <<< 4) - a101;                   // 2^-3, 10n at 2^-10, 101 at 2^-14
    zn[14] = z[15] + (a10n <<< 12) + (a101 <<< 1) - (a10n <<< 6);        // 10n at 2^-2, 101 at 2^-13, 10n at 2^-8
    zn[13] = z[14] + (a100n <<< 11) + (a10n <<< 5) + x;                  // 100n at 2^-2, 10n at 2^-9, 2^-16
    zn[12] = z[13] + (a100n <<< 11) + (a10n <<< 5) + x;                  // 100n at 2^-2, 10n at 2^-9, 2^-16
    zn[11] = z[12] + (a10n <<< 12) + (a101 <<< 1) - (a10n <<< 6);        // 10n at 2^-2, 101 at 2^-13, 10n at 2^-8
    zn[10] = z[11] + (x <<< 13) - (a10n <<< 4) - a101;                   // 2^-3, 10n at 2^-10, 101 at 2^-14
    zn[9]  = z[10] + (x <<< 12) - (a100n <<< 6) - a10n;                  // 2^-4, 100n at 2^-7, 10n at 2^-14
    zn[8]  = z[9] + (a100n <<< 1) - (a10n <<< 6);                        // 100n at 2^-12, 10n at 2^-8
    zn[7]  = z[8] - (a100n <<< 6) - a100n - (x <<< 11);                  // 100n at 2^-7, 100n at 2^-13, 2^-5
    zn[6]  = z[7] + a101 - (a10n <<< 10);                                // 101 at 2^-14, 10n at 2^-4
    zn[5]  = z[6] + a100n - (a101 <<< 5);                                // 100n at 2^-13, 101 at 2^-9
    zn[4]  = z[5] + a10n - (a100n <<< 4);                                // 10n at 2^-14, 100n at 2^-9
    zn[3]  = z[4] + (a100n <<< 7) + (x <<< 2);                           // 100n at 2^-6, 2^-14
    zn[2]  = z[3] + (a10n <<< 1) + (vb <<< 11);                          // 10n at 2^-13, 100n col 5
    zn[1]  = z[2] + (a100n <<< 7) + a100n + (x <<< 12);                  // 100n at 2^-6, 100n at 2^-13, 2^-4
    y_next = z[1] - (a10n <<< 5) - a10n - (va <<< 9);                    // 10n at 2^-9, 10n at 2^-14, 10001 col 7
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 1; k <= TOP; k++) z[k] <= '0;
      y_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= en;
      if (en) begin
        for (int k = 1; k <= TOP; k++) z[k] <= zn[k];
        y_out <= y_next;
      end
    end
  end

endmodule
