// fir15_hv_cse: 15-tap linear phase raised cosine FIR filter (GSM pulse
// shaping, cutoff 135.44 kHz, roll-off 0.22, fs = 541.67 kHz) realised with
// 20 adders by sharing horizontal and vertical common subexpressions of its
// 12-bit CSD coefficients.
//
// Structure: hcse_gen forms the horizontal patterns x2 (101) and x3 (10n)
// from the input sample (2 adders); vcse_gen forms the vertical patterns
// x4 = x1 + x1[-2] and x5 = -x1 + x1[-2] (2 adders and a two-sample input
// delay); tdf_output adds the shifted subexpressions into tap products and
// runs them through a transposed direct form delay/adder line (16 adders).
//
// Coefficients, scaled by 2^12 (h(14-k) = h(k)):
//   h0 = 101, h2 = 194, h4 = 391, h6 = 1289, h7 = 2048, odd taps 1..13 = 0.
// These are the magnitudes, all taken positive as in the usual drawing of
// CSD patterns (TRUE_SIGNS = 0, the default). TRUE_SIGNS = 1, this design's
// own addition, gives the actual raised cosine with h0 and h4 (and their
// mirrors h14, h10) negative, at the same adder count.
// The output is the exact convolution sum(h(k) * x(n-k)) as an integer, i.e.
// the filter output scaled by 2^12, W_IN + 13 bits wide.
//
// Interface and timing: present a sample on x_in with in_valid high for one
// clock; y_out holds its filter output from the next clock on, flagged by
// out_valid for that one clock. in_valid may stay low for any number of
// clocks (the filter then holds its state) and may be high every clock
// (one sample per clock). rst_n is a synchronous active-low reset that
// clears all delay registers. The filter equation, the coefficient set and
// the transposed structure follow the filter's specification; the widths,
// the sample strobe, the output register and the reset are this design's
// own choices.
module fir15_hv_cse
  import fir_hv_pkg::*;
#(
  parameter int unsigned W_IN = DEF_W_IN,
  parameter bit          TRUE_SIGNS = 1'b0
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic signed [W_IN-1:0]        x_in,
  output logic                          out_valid,
  output logic signed [W_IN+GROWTH-1:0] y_out
);

  logic signed [W_IN+H_GUARD:0] x2s, x3s;
  logic signed [W_IN:0]         x4, x5;

  hcse_gen #(.W_IN(W_IN)) u_hcse (
    .x1  (x_in),
    .x2s (x2s),
    .x3s (x3s)
  );

  vcse_gen #(.W_IN(W_IN)) u_vcse (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (in_valid),
    .x1    (x_in),
    .x4    (x4),
    .x5    (x5)
  );

  tdf_output #(.W_IN(W_IN), .W_OUT(W_IN + GROWTH), .TRUE_SIGNS(TRUE_SIGNS)) u_tdf (
    .clk       (clk),
    .rst_n     (rst_n),
    .en        (in_valid),
    .x1        (x_in),
    .x2s       (x2s),
    .x3s       (x3s),
    .x4        (x4),
    .x5        (x5),
    .out_valid (out_valid),
    .y_out     (y_out)
  );

  // out_valid follows in_valid by exactly one clock.
  property p_valid_latency;
    @(posedge clk) disable iff (!rst_n) in_valid |=> out_valid;
  endproperty
  a_valid_latency : assert property (p_valid_latency)
    else $error("out_valid missing one clock after in_valid");

endmodule
