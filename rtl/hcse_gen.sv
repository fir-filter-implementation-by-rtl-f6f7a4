// hcse_gen: horizontal common subexpression generator.
//
// The two most frequent horizontal CSD patterns of the 15-tap filter are
// 101 and 10n (n = -1). Each is formed once from the input sample x1 and
// then shared by every coefficient that contains it:
//   x2 = x1 + (x1 >> 2)   (pattern 101)
//   x3 = x1 - (x1 >> 2)   (pattern 10n)
// To keep the ">> 2" exact, both outputs are produced scaled by 4:
//   x2s = 4*x2 = (x1 << 2) + x1 = 5*x1
//   x3s = 4*x3 = (x1 << 2) - x1 = 3*x1
// That is one adder and one subtractor, as in the filter's adder budget.
//
// Interface: x1 is a signed W_IN-bit sample; x2s and x3s are signed
// W_IN+3 bits. Purely combinational, no latency. The patterns and their
// formulas follow the filter's specification; the scaled-by-4 form is this
// design's own choice for exact arithmetic.
module hcse_gen
  import fir_hv_pkg::*;
#(
  parameter int unsigned W_IN = DEF_W_IN
) (
  input  logic signed [W_IN-1:0]         x1,
  output logic signed [W_IN+H_GUARD:0]   x2s,
  output logic signed [W_IN+H_GUARD:0]   x3s
);

  localparam int unsigned WH = W_IN + H_GUARD + 1;

  logic signed [WH-1:0] x1_ext;
  logic signed [WH-1:0] x1_sh2;

  always_comb begin
    x1_ext = WH'(x1);
    x1_sh2 = x1_ext <<< H_GUARD;
    x2s    = x1_sh2 + x1_ext;   // 101
    x3s    = x1_sh2 - x1_ext;   // 10n
  end

endmodule
