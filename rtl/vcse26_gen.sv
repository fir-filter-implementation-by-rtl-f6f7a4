// vcse26_gen: vertical common subexpression generator of the 26-tap filter.
//
// After the horizontal patterns of the 26-tap coefficient set have been
// taken out, equal digits left in one bit column are paired across taps:
//   v10001 = x1 + x1[-4]   (pattern 10001 down a column: taps k and k+4)
//   v100n  = x1 - x1[-3]   (pattern 100n down a column: taps k and k+3)
// where x1[-d] is the input d samples earlier. The block keeps the
// four-stage input delay line these need, and two adders.
//
// Interface: en advances the delay line by one sample; rst_n clears it
// synchronously. x1 is a signed W_IN-bit sample; v10001 and v100n are
// signed W_IN+1 bits and combinational in x1 and the delay line. The
// pattern set follows the sharing method; which digit pairs use them, the
// strobe and the reset are this design's own choices.
module vcse26_gen
  import fir_hv_pkg::*;
#(
  parameter int unsigned W_IN = DEF_W_IN
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic signed [W_IN-1:0] x1,
  output logic signed [W_IN:0]   v10001,
  output logic signed [W_IN:0]   v100n
);

  logic signed [W_IN-1:0] xd [1:4];   // xd[d] = x1[-d]

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int d = 1; d <= 4; d++) xd[d] <= '0;
    end else if (en) begin
      xd[1] <= x1;
      for (int d = 2; d <= 4; d++) xd[d] <= xd[d-1];
    end
  end

  always_comb begin
    v10001 = (W_IN+1)'(x1) + (W_IN+1)'(xd[4]);
    v100n  = (W_IN+1)'(x1) - (W_IN+1)'(xd[3]);
  end

endmodule
