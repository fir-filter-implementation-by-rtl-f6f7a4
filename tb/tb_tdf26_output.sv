// tb_tdf26_output: self-checking test of the 26-tap tap products and adder
// line. The testbench forms the subexpressions itself (5x, 3x, 9x, 7x,
// x + x(n-4), x - x(n-3)) and compares y_out, one clock after each accepted
// sample, with the direct convolution of the reference coefficients.
module tb_tdf26_output;
  import fir26_ref_pkg::*;
  localparam int unsigned W = 16;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [W-1:0] x1 = '0;
  logic signed [W+3:0] s101, s10n, s1001, s100n;
  logic signed [W:0]   v10001, v100n;
  logic                out_valid;
  logic signed [W+8:0] y_out;
  int checks = 0, failures = 0;
  longint hist[N];
  longint expected;

  tdf26_output #(.W_IN(W)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .x1(x1), .s101(s101), .s10n(s10n),
    .s1001(s1001), .s100n(s100n), .v10001(v10001), .v100n(v100n),
    .out_valid(out_valid), .y_out(y_out));

  always #5 clk = ~clk;

  always_comb begin
    s101   = (W+4)'(5 * int'(x1));
    s10n   = (W+4)'(3 * int'(x1));
    s1001  = (W+4)'(9 * int'(x1));
    s100n  = (W+4)'(7 * int'(x1));
    v10001 = (W+1)'(int'(x1) + int'(hist[4]));
    v100n  = (W+1)'(int'(x1) - int'(hist[3]));
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (hist[k]) hist[k] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      x1 = $signed(W'($urandom));
      if (i >= 100 && i < 160) x1 = (i < 130) ? W'(32767) : W'(-32768);
      en = ($urandom_range(0, 3) != 0);
      hist[0] = longint'(x1);
      @(posedge clk);
      if (en) begin
        expected = 0;
        for (int k = 0; k < N; k++) expected += longint'(coef(k)) * hist[k];
        #1;
        checks++;
        if (!out_valid || longint'(y_out) != expected) begin
          failures++;
          $display("FAIL i=%0d y=%0d exp=%0d valid=%b", i, y_out, expected, out_valid);
        end
        for (int k = N - 1; k > 0; k--) hist[k] = hist[k - 1];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
