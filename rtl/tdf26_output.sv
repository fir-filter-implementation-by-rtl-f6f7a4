// tdf26_output: tap products and transposed direct form adder line of the
// 26-tap Parks-McClellan low-pass filter (pass band edge 0.2*pi, stop band
// edge 0.25*pi) with 8-bit CSD coefficients.
//
// Coefficients h(k) * 2^8 (h(25-k) = h(k)), magnitudes truncated to 8
// fractional bits, CSD digits by position (weight 2^-p, n = -1):
//   h0  =  -2  (n at 7)          h7  =  -9  (n 5, n 8)
//   h1  =  19  (4, 6, n8)        h8  =   0
//   h2  =   8  (5)               h9  =  14  (4, n7)
//   h3  =   3  (6, n8)           h10 =  31  (3, n8)
//   h4  =  -2  (n7)              h11 =  47  (2, n4, n8)
//   h5  =  -8  (n5)              h12 =  56  (2, n5)
//   h6  = -11  (n4, 6, 8)
// Sharing, first horizontal then vertical:
//   horizontal (hcse4_gen): 101 in h1; 10n in h3, h6, h11; 1001 in h7;
//                           100n in h9, h12
//   vertical (vcse26_gen):  10001 in column 7 (taps 0/4, 21/25) and
//                           column 8 (taps 10/14, 11/15);
//                           100n in column 5 (taps 2/5, 20/23)
// giving, at the 2^8 scale, the tap products
//   P0 = -2*v10001         P1 = 4*s101 - x       P2 = 8*v100n    P3 = s10n
//   P6 = x - 4*s10n        P7 = -s1001           P9 = 2*s100n
//   P10 = 32*x - v10001    P11 = 16*s10n - v10001
//   P12 = 8*s100n          and P(25-k) = P(k) for the rest, except that
//   P13..P24 carry no second copy of a vertical pair already started
//   (P14 = 16*s10n, P15 = 32*x, P20 = -8*v100n, P21 = -2*v10001).
// Products of taps 4, 5, 8, 17, 23 and 25 are zero or covered by a vertical
// pair, so their stages are plain registers. Twenty-six terms need 25
// adders here; with the 4 horizontal and 2 vertical subexpression adders
// the filter uses 31. Negative products are subtracted on the chain.
//
// All values are integers scaled by 2^8: y_out = sum(h(k) * x(n-k)) exactly,
// W_IN + 9 bits. Timing and interface are those of tdf_output: on a clock
// with en high the chain advances one sample and y_out takes the output for
// the sample presented; out_valid flags it one clock later. rst_n clears
// the chain synchronously.
//
// The coefficient values and the pattern types follow the filter's
// specification; the assignment of digits to shared patterns shown above is
// this design's own, as are the truncation of magnitudes with the sign of
// each coefficient kept, the output register, strobe and reset.
module tdf26_output
  import fir_hv_pkg::*;
#(
  parameter int unsigned W_IN = DEF_W_IN,
  parameter int unsigned W_OUT = W_IN + EX1_GROWTH
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic signed [W_IN-1:0] x1,
  input  logic signed [W_IN+3:0] s101,
  input  logic signed [W_IN+3:0] s10n,
  input  logic signed [W_IN+3:0] s1001,
  input  logic signed [W_IN+3:0] s100n,
  input  logic signed [W_IN:0]   v10001,
  input  logic signed [W_IN:0]   v100n,
  output logic                   out_valid,
  output logic signed [W_OUT-1:0] y_out
);

  typedef logic signed [W_OUT-1:0] acc_t;

  localparam int unsigned TOP = EX1_N_TAPS - 2;   // highest nonzero tap (24)

  acc_t x, a101, a10n, a1001, a100n, va, vb;
  acc_t z  [1:TOP];
  acc_t zn [1:TOP];
  acc_t y_next;

  always_comb begin
    x     = acc_t'(x1);
    a101  = acc_t'(s101);
    a10n  = acc_t'(s10n);
    a1001 = acc_t'(s1001);
    a100n = acc_t'(s100n);
    va    = acc_t'(v10001);
    vb    = acc_t'(v100n);

    for (int k = 1; k < TOP; k++) zn[k] = z[k+1];   // default: plain register

    zn[24] = (a101 <<< 2) - x;                      // P24 = h1
    zn[22] = z[23] + a10n;                          // P22 = h3
    zn[21] = z[22] - (va <<< 1);                    // P21: column 7, taps 21/25
    zn[20] = z[21] - (vb <<< 3);                    // P20: column 5, taps 20/23
    zn[19] = z[20] + x - (a10n <<< 2);              // P19 = h6
    zn[18] = z[19] - a1001;                         // P18 = h7
    zn[16] = z[17] + (a100n <<< 1);                 // P16 = h9
    zn[15] = z[16] + (x <<< 5);                     // P15: h10 less column 8
    zn[14] = z[15] + (a10n <<< 4);                  // P14: h11 less column 8
    zn[13] = z[14] + (a100n <<< 3);                 // P13 = h12
    zn[12] = z[13] + (a100n <<< 3);                 // P12 = h12
    zn[11] = z[12] + (a10n <<< 4) - va;             // P11: column 8, taps 11/15
    zn[10] = z[11] + (x <<< 5) - va;                // P10: column 8, taps 10/14
    zn[9]  = z[10] + (a100n <<< 1);                 // P9  = h9
    zn[7]  = z[8]  - a1001;                         // P7  = h7
    zn[6]  = z[7]  + x - (a10n <<< 2);              // P6  = h6
    zn[3]  = z[4]  + a10n;                          // P3  = h3
    zn[2]  = z[3]  + (vb <<< 3);                    // P2: column 5, taps 2/5
    zn[1]  = z[2]  + (a101 <<< 2) - x;              // P1  = h1
    y_next = z[1]  - (va <<< 1);                    // P0: column 7, taps 0/4
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
