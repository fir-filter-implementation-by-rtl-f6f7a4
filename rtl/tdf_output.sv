// tdf_output: tap products and transposed direct form adder line of the
// 15-tap filter.
//
// The filter output is written as a sum of shifted, delayed subexpressions:
//   y = x3>>5 + x2>>10 + x3[-2]>>4 + x1[-2]>>11 + x3[-4]>>3 + x4[-4]>>9
//     + x5[-4]>>12 + x2[-6]>>2 + x1[-7]>>1 + x2[-8]>>2 + x4[-8]>>9
//     - x5[-8]>>12 + x3[-10]>>3 + x3[-12]>>4 + x1[-12]>>11 + x3[-14]>>5
//     + x2[-14]>>10
// In transposed direct form the terms that share a delay k are summed into a
// tap product P_k (no multipliers, only wired shifts), and a chain of
// registers z_k carries the partial sums towards the output:
//   z_14 <= P_14,  z_k <= P_k + z_{k+1} (or z_{k+1} where P_k = 0),
//   y    =  P_0 + z_1
// Seventeen terms give sixteen adders: eight inside P_0, P_2, P_4, P_8,
// P_12, P_14 and eight on the chain (at k = 0, 2, 4, 6, 7, 8, 10, 12). Taps
// 1, 3, 5, 9, 11 and 13 are zero, so their stages are plain registers.
//
// TRUE_SIGNS = 0 builds the equation above as printed, with every
// coefficient taken positive (the usual convention when CSD patterns are
// drawn). TRUE_SIGNS = 1 gives the actual raised cosine, in which h(0),
// h(4), h(10) and h(14) are negative: the same subexpressions and the same
// sixteen adders, with x4 and x5 trading their 2^-9 and 2^-12 columns and
// the negative tap products subtracted on the chain. This option is this
// design's own addition.
//
// All values are integers scaled by 2^12 (see fir_hv_pkg): x >> s becomes
// x << (12 - s), and x2s/x3s already carry a factor 4. The output is exact.
//
// Interface: x1 (W_IN bits), x2s/x3s (W_IN+3), x4/x5 (W_IN+1) are the
// current sample and its subexpressions, valid while en is high. On a clock
// edge with en high the chain advances one sample and y_out is loaded with
// y for the current sample, so y_out is valid one clock after the sample
// was presented; out_valid marks that clock. rst_n clears the chain
// synchronously. The equation and the transposed structure follow the
// filter's specification; the output register, strobe and reset are this
// design's own choices.
module tdf_output
  import fir_hv_pkg::*;
#(
  parameter int unsigned W_IN = DEF_W_IN,
  parameter int unsigned W_OUT = W_IN + GROWTH,
  parameter bit          TRUE_SIGNS = 1'b0
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          en,
  input  logic signed [W_IN-1:0]        x1,
  input  logic signed [W_IN+H_GUARD:0]  x2s,
  input  logic signed [W_IN+H_GUARD:0]  x3s,
  input  logic signed [W_IN:0]          x4,
  input  logic signed [W_IN:0]          x5,
  output logic                          out_valid,
  output logic signed [W_OUT-1:0]       y_out
);

  typedef logic signed [W_OUT-1:0] acc_t;

  // Operands widened to the accumulator width (sign extended).
  acc_t a1, a2, a3, a4, a5;

  // Tap products (only the nonzero ones).
  acc_t p0, p2, p4, p6, p7, p8, p10, p12, p14;

  // Transposed delay line: z[k] holds the partial sum entering tap k-1.
  acc_t z [1:N_TAPS-1];

  acc_t zn [1:N_TAPS-1];   // next value of each chain register
  acc_t y_next;

  // Left shift that realises "x >> s" at the 2^COEF_FRAC scale, for a plain
  // operand (SX) and for a horizontal subexpression carried times 4 (SH).
  function automatic int unsigned SX(int unsigned s);
    return COEF_FRAC - s;
  endfunction
  function automatic int unsigned SH(int unsigned s);
    return COEF_FRAC - H_GUARD - s;
  endfunction

  always_comb begin
    a1 = acc_t'(x1);
    a2 = acc_t'(x2s);
    a3 = acc_t'(x3s);
    a4 = acc_t'(x4);
    a5 = acc_t'(x5);

    // A term "x >> s" of the equation is "x << (COEF_FRAC - s)" at the
    // 2^12 scale; x2s/x3s already carry 2^H_GUARD, so they shift H_GUARD less.
    // Chain stages without a product are plain registers.
    for (int k = 1; k < N_TAPS - 1; k++) zn[k] = z[k+1];
    if (!TRUE_SIGNS) begin
      // All coefficients positive: Eq. terms exactly as listed above.
      p0  = (a3 <<< SH(5))  + (a2 <<< SH(10));                  // x3>>5 + x2>>10
      p2  = (a3 <<< SH(4))  + (a1 <<< SX(11));                  // x3>>4 + x1>>11
      p4  = (a3 <<< SH(3))  + (a4 <<< SX(9)) + (a5 <<< SX(12)); // x3>>3 + x4>>9 + x5>>12
      p6  =  a2 <<< SH(2);                                      // x2>>2
      p7  =  a1 <<< SX(1);                                      // x1>>1
      p8  = (a2 <<< SH(2))  + (a4 <<< SX(9)) - (a5 <<< SX(12)); // x2>>2 + x4>>9 - x5>>12
      p10 =  a3 <<< SH(3);                                      // x3>>3
      p12 = (a3 <<< SH(4))  + (a1 <<< SX(11));                  // x3>>4 + x1>>11
      p14 = (a3 <<< SH(5))  + (a2 <<< SH(10));                  // x3>>5 + x2>>10
      zn[14] = p14;
      zn[12] = z[13] + p12;
      zn[10] = z[11] + p10;
      zn[8]  = z[9]  + p8;
      zn[7]  = z[8]  + p7;
      zn[6]  = z[7]  + p6;
      zn[4]  = z[5]  + p4;
      zn[2]  = z[3]  + p2;
      y_next = z[1]  + p0;
    end else begin
      // Raised cosine signs: h(0), h(4), h(10), h(14) negative. The 2^-9
      // digits of h(4)/h(6) and h(8)/h(10) now differ in sign and the 2^-12
      // digits agree, so x5 takes column 9 and x4 column 12. Negative
      // products are subtracted on the chain; z[14] and z[13] hold +|P14|,
      // which the adder at tap 12 subtracts. Same 16 adders.
      p0  = (a3 <<< SH(5))  + (a2 <<< SH(10));                  // |P0|
      p2  = (a3 <<< SH(4))  + (a1 <<< SX(11));
      p4  = (a5 <<< SX(9))  + (a4 <<< SX(12)) - (a3 <<< SH(3)); // x5>>9 + x4>>12 - x3>>3
      p6  =  a2 <<< SH(2);
      p7  =  a1 <<< SX(1);
      p8  = (a2 <<< SH(2))  - (a5 <<< SX(9)) + (a4 <<< SX(12)); // x2>>2 - x5>>9 + x4>>12
      p10 =  a3 <<< SH(3);                                      // |P10|
      p12 = (a3 <<< SH(4))  + (a1 <<< SX(11));
      p14 = (a3 <<< SH(5))  + (a2 <<< SH(10));                  // |P14|
      zn[14] = p14;
      zn[12] = p12 - z[13];
      zn[10] = z[11] - p10;
      zn[8]  = z[9]  + p8;
      zn[7]  = z[8]  + p7;
      zn[6]  = z[7]  + p6;
      zn[4]  = z[5]  + p4;
      zn[2]  = z[3]  + p2;
      y_next = z[1]  - p0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 1; k < N_TAPS; k++) z[k] <= '0;
      y_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= en;
      if (en) begin
        for (int k = 1; k < N_TAPS; k++) z[k] <= zn[k];
        y_out <= y_next;
      end
    end
  end

endmodule
