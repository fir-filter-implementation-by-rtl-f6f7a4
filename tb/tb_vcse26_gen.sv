// tb_vcse26_gen: self-checking test of the vertical subexpression generator
// of the 26-tap filter: v10001 = x(n) + x(n-4) and v100n = x(n) - x(n-3)
// over a random stream with random gaps in the strobe.
module tb_vcse26_gen;
  localparam int unsigned W = 16;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [W-1:0] x1 = '0;
  logic signed [W:0]   v10001, v100n;
  int checks = 0, failures = 0;
  int hist[5];   // hist[d] = x(n-d) of the accepted samples

  vcse26_gen #(.W_IN(W)) dut (.clk(clk), .rst_n(rst_n), .en(en), .x1(x1),
                              .v10001(v10001), .v100n(v100n));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (hist[d]) hist[d] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      x1 = $signed(W'($urandom));
      if (i % 500 == 0) x1 = (i % 1000 == 0) ? W'(32767) : W'(-32768);
      en = ($urandom_range(0, 3) != 0);
      #1;
      checks++;
      if (int'(v10001) != int'(x1) + hist[4] || int'(v100n) != int'(x1) - hist[3]) begin
        failures++;
        $display("FAIL i=%0d x=%0d v10001=%0d v100n=%0d", i, x1, v10001, v100n);
      end
      @(posedge clk);
      if (en) begin
        for (int d = 4; d > 1; d--) hist[d] = hist[d - 1];
        hist[1] = int'(x1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
