// tb_tdf_output: self-checking test of the tap products and the transposed
// adder line. The testbench forms the subexpressions itself (x2s = 5x,
// x3s = 3x, x4 = x + x(n-2), x5 = x(n-2) - x) and compares y_out, one clock
// after each accepted sample, with the direct convolution sum(h(k) x(n-k))
// of the reference model. The strobe has random gaps. A second instance with
// TRUE_SIGNS = 1 is checked against the signed raised cosine coefficients.
module tb_tdf_output;
  import fir15_ref_pkg::*;
  localparam int unsigned W = 16;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [W-1:0] x1 = '0;
  logic signed [W+2:0] x2s, x3s;
  logic signed [W:0]   x4, x5;
  logic                out_valid;
  logic signed [W+12:0] y_out;
  logic                 out_valid_rc;
  logic signed [W+12:0] y_out_rc;     // TRUE_SIGNS = 1 instance
  longint expected_rc;
  int checks = 0, failures = 0;
  longint hist[N];   // hist[k] = x(n-k) of accepted samples, hist[0] current
  longint expected;

  tdf_output #(.W_IN(W)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .x1(x1), .x2s(x2s), .x3s(x3s),
    .x4(x4), .x5(x5), .out_valid(out_valid), .y_out(y_out));

  tdf_output #(.W_IN(W), .TRUE_SIGNS(1'b1)) dut_rc (
    .clk(clk), .rst_n(rst_n), .en(en), .x1(x1), .x2s(x2s), .x3s(x3s),
    .x4(x4), .x5(x5), .out_valid(out_valid_rc), .y_out(y_out_rc));

  always #5 clk = ~clk;

  always_comb begin
    x2s = (W+3)'(5 * int'(x1));
    x3s = (W+3)'(3 * int'(x1));
    x4  = (W+1)'(int'(x1) + int'(hist[2]));
    x5  = (W+1)'(int'(hist[2]) - int'(x1));
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
      if (i >= 100 && i < 140) x1 = (i < 120) ? W'(32767) : W'(-32768);
      en = ($urandom_range(0, 3) != 0);
      hist[0] = longint'(x1);
      // hist[1..] still hold the previous accepted samples
      @(posedge clk);
      if (en) begin
        expected = 0;
        expected_rc = 0;
        for (int k = 0; k < N; k++) begin
          expected    += longint'(coef(k)) * hist[k];
          expected_rc += longint'(coef(k, 1'b1)) * hist[k];
        end
        #1;
        checks++;
        if (!out_valid || longint'(y_out) != expected) begin
          failures++;
          $display("FAIL i=%0d y=%0d exp=%0d valid=%b", i, y_out, expected, out_valid);
        end
        checks++;
        if (!out_valid_rc || longint'(y_out_rc) != expected_rc) begin
          failures++;
          $display("FAIL (true signs) i=%0d y=%0d exp=%0d", i, y_out_rc, expected_rc);
        end
        for (int k = N - 1; k > 0; k--) hist[k] = hist[k - 1];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
