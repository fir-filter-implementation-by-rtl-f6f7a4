// vcse_gen: vertical common subexpression generator.
//
// After the horizontal patterns are taken out, the remaining CSD digits of
// coefficients two taps apart line up in the same bit column. Two such
// vertical patterns are shared:
//   x4 =  x1 + x1[-2]   (pattern 1 over 1, two taps apart)
//   x5 = -x1 + x1[-2]   (pattern n over 1, two taps apart)
// where x1[-2] is the input sample from two sample periods earlier. The
// block holds that two-stage input delay line and the two adders.
//
// Interface: x1 is the signed W_IN-bit input sample, en advances the delay
// line by one sample (a sample strobe), rst_n clears it synchronously to
// zero (assumed reset style). x4 and x5 are signed W_IN+1 bits and are
// combinational in x1 and the delay line. The patterns follow the filter's
// specification; the strobe and reset are this design's own choices.
module vcse_gen
  import fir_hv_pkg::*;
#(
  parameter int unsigned W_IN = DEF_W_IN
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic signed [W_IN-1:0] x1,
  output logic signed [W_IN:0]   x4,
  output logic signed [W_IN:0]   x5
);

  logic signed [W_IN-1:0] x1_d1;
  logic signed [W_IN-1:0] x1_d2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x1_d1 <= '0;
      x1_d2 <= '0;
    end else if (en) begin
      x1_d1 <= x1;
      x1_d2 <= x1_d1;
    end
  end

  always_comb begin
    x4 = (W_IN+1)'(x1_d2) + (W_IN+1)'(x1);
    x5 = (W_IN+1)'(x1_d2) - (W_IN+1)'(x1);
  end

endmodule
