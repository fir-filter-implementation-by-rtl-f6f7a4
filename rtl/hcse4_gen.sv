// hcse4_gen: generator of the four most common horizontal subexpressions.
//
// In CSD coefficient sets of linear phase FIR filters the patterns 101,
// 10n, 1001 and 100n (n = -1) are the most frequent two-digit groups. Each
// is formed once from the input sample and shared by every coefficient
// that contains it. A pattern is produced as an integer aligned to its
// lower digit:
//   s101  = (x << 2) + x = 5x      s10n  = (x << 2) - x = 3x
//   s1001 = (x << 3) + x = 9x      s100n = (x << 3) - x = 7x
// A pattern whose upper digit has weight 2^-p is then used as
// s * 2^-(p + gap). The first two come from hcse_gen; this block adds the
// other two: four adders in all.
//
// Interface: x1 is a signed W_IN-bit sample; the four outputs are signed
// W_IN+4 bits. Purely combinational. The choice of the four patterns
// follows the sharing method; the integer alignment is this design's own.
module hcse4_gen
  import fir_hv_pkg::*;
#(
  parameter int unsigned W_IN = DEF_W_IN
) (
  input  logic signed [W_IN-1:0] x1,
  output logic signed [W_IN+3:0] s101,
  output logic signed [W_IN+3:0] s10n,
  output logic signed [W_IN+3:0] s1001,
  output logic signed [W_IN+3:0] s100n
);

  localparam int unsigned WS = W_IN + 4;

  logic signed [W_IN+H_GUARD:0] x2s, x3s;
  logic signed [WS-1:0]         x1_ext;

  hcse_gen #(.W_IN(W_IN)) u_h2 (
    .x1  (x1),
    .x2s (x2s),
    .x3s (x3s)
  );

  always_comb begin
    x1_ext = WS'(x1);
    s101   = WS'(x2s);
    s10n   = WS'(x3s);
    s1001  = (x1_ext <<< 3) + x1_ext;
    s100n  = (x1_ext <<< 3) - x1_ext;
  end

endmodule
