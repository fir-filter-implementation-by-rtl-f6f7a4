// fir_hv_top: the multiplierless FIR filters built from shared horizontal
// and vertical common subexpressions, side by side.
//
//   f15: 15-tap linear phase raised cosine filter for GSM pulse shaping
//        (fir15_hv_cse, 12-bit CSD coefficients, 20 adders)
//   f26: 26-tap linear phase Parks-McClellan low-pass filter
//        (fir26_hv_cse, 8-bit CSD coefficients, 31 adders)
//   f26w: the same filter with 16-bit CSD coefficients (70 adders)
//
// The filters are independent: each has its own sample strobe, input and
// output; only the clock and the synchronous active-low reset are shared.
// For each, a sample on *_x_in is taken on a clock with *_in_valid high and
// its exact output (scaled by 2^12 for f15, 2^8 for f26, 2^16 for f26w)
// appears on the next clock with *_out_valid high. Putting the filters in
// one top is this design's own packaging choice.
module fir_hv_top
  import fir_hv_pkg::*;
#(
  parameter int unsigned W_IN = DEF_W_IN,
  parameter bit          F15_TRUE_SIGNS = 1'b0
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // 15-tap raised cosine filter
  input  logic                              f15_in_valid,
  input  logic signed [W_IN-1:0]            f15_x_in,
  output logic                              f15_out_valid,
  output logic signed [W_IN+GROWTH-1:0]     f15_y_out,
  // 26-tap Parks-McClellan filter
  input  logic                              f26_in_valid,
  input  logic signed [W_IN-1:0]            f26_x_in,
  output logic                              f26_out_valid,
  output logic signed [W_IN+EX1_GROWTH-1:0] f26_y_out,
  // 26-tap Parks-McClellan filter, 16-bit coefficients
  input  logic                               f26w_in_valid,
  input  logic signed [W_IN-1:0]             f26w_x_in,
  output logic                               f26w_out_valid,
  output logic signed [W_IN+EX1W_GROWTH-1:0] f26w_y_out
);

  fir15_hv_cse #(.W_IN(W_IN), .TRUE_SIGNS(F15_TRUE_SIGNS)) u_f15 (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (f15_in_valid),
    .x_in      (f15_x_in),
    .out_valid (f15_out_valid),
    .y_out     (f15_y_out)
  );

  fir26_hv_cse #(.W_IN(W_IN), .COEF_BITS(EX1_COEF_FRAC)) u_f26 (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (f26_in_valid),
    .x_in      (f26_x_in),
    .out_valid (f26_out_valid),
    .y_out     (f26_y_out)
  );

  fir26_hv_cse #(.W_IN(W_IN), .COEF_BITS(EX1W_COEF_FRAC)) u_f26w (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (f26w_in_valid),
    .x_in      (f26w_x_in),
    .out_valid (f26w_out_valid),
    .y_out     (f26w_y_out)
  );

endmodule
