// fir26_hv_cse: 26-tap linear phase Parks-McClellan low-pass FIR filter
// (pass band edge 0.2*pi, stop band edge 0.25*pi) with CSD coefficients,
// realised by sharing horizontal and vertical common subexpressions:
// COEF_BITS = 8 (default) needs 31 adders, COEF_BITS = 16 needs 70.
//
// Structure: hcse4_gen forms the four horizontal patterns 101, 10n, 1001
// and 100n of the input sample (4 adders); vcse26_gen forms the vertical
// patterns x + x[-4] and x - x[-3] (2 adders, four input delay registers);
// tdf26_output (8-bit) or tdf26_16_output (16-bit) sums the shifted
// subexpressions in a transposed direct form delay/adder line (25 or 65
// adders). The 16-bit set uses no 1001 pattern, so that generator output is
// left open there. The coefficient lists and the sharing are given in the
// two chain modules.
//
// Interface and timing: as fir15_hv_cse. A sample on x_in is taken on a
// clock with in_valid high; y_out = sum(h(k) * x(n-k)) * 2^COEF_BITS (exact,
// W_IN + 9 bits for 8-bit, W_IN + 17 bits for 16-bit coefficients) appears
// on the next clock with out_valid high. rst_n is a
// synchronous active-low reset. The coefficients and the method follow the
// filter's specification; the digit allocation, widths, strobe, output
// register and reset are this design's own choices.
module fir26_hv_cse
  import fir_hv_pkg::*;
#(
  parameter int unsigned W_IN = DEF_W_IN,
  parameter int unsigned COEF_BITS = EX1_COEF_FRAC   // 8 or 16
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              in_valid,
  input  logic signed [W_IN-1:0]            x_in,
  output logic                              out_valid,
  output logic signed [W_IN+ex1_growth(COEF_BITS)-1:0] y_out
);

  localparam int unsigned W_OUT = W_IN + ex1_growth(COEF_BITS);

  logic signed [W_IN+3:0] s101, s10n, s1001, s100n;
  logic signed [W_IN:0]   v10001, v100n;

  hcse4_gen #(.W_IN(W_IN)) u_hcse (
    .x1    (x_in),
    .s101  (s101),
    .s10n  (s10n),
    .s1001 (s1001),
    .s100n (s100n)
  );

  vcse26_gen #(.W_IN(W_IN)) u_vcse (
    .clk    (clk),
    .rst_n  (rst_n),
    .en     (in_valid),
    .x1     (x_in),
    .v10001 (v10001),
    .v100n  (v100n)
  );

  if (COEF_BITS == EX1W_COEF_FRAC) begin : g_coef16
    tdf26_16_output #(.W_IN(W_IN), .W_OUT(W_OUT)) u_tdf (
      .clk       (clk),
      .rst_n     (rst_n),
      .en        (in_valid),
      .x1        (x_in),
      .s101      (s101),
      .s10n      (s10n),
      .s100n     (s100n),
      .v10001    (v10001),
      .v100n     (v100n),
      .out_valid (out_valid),
      .y_out     (y_out)
    );
  end else begin : g_coef8
    tdf26_output #(.W_IN(W_IN), .W_OUT(W_OUT)) u_tdf (
      .clk       (clk),
      .rst_n     (rst_n),
      .en        (in_valid),
      .x1        (x_in),
      .s101      (s101),
      .s10n      (s10n),
      .s1001     (s1001),
      .s100n     (s100n),
      .v10001    (v10001),
      .v100n     (v100n),
      .out_valid (out_valid),
      .y_out     (y_out)
    );
  end

  initial begin
    assert (COEF_BITS == EX1_COEF_FRAC || COEF_BITS == EX1W_COEF_FRAC)
      else $fatal(1, "COEF_BITS must be 8 or 16");
  end

  // out_valid follows in_valid by exactly one clock.
  property p_valid_latency;
    @(posedge clk) disable iff (!rst_n) in_valid |=> out_valid;
  endproperty
  a_valid_latency : assert property (p_valid_latency)
    else $error("out_valid missing one clock after in_valid");

endmodule
