// tb_vcse_gen: self-checking test of the vertical subexpression generator.
// Feeds a random sample stream with random gaps in the strobe and checks
// x4 = x(n) + x(n-2) and x5 = x(n-2) - x(n) against a history kept here,
// including the zero history right after reset.
module tb_vcse_gen;
  localparam int unsigned W = 16;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [W-1:0] x1 = '0;
  logic signed [W:0]   x4, x5;
  int checks = 0, failures = 0;
  int hist1 = 0, hist2 = 0;   // x(n-1), x(n-2) of the accepted samples

  vcse_gen #(.W_IN(W)) dut (.clk(clk), .rst_n(rst_n), .en(en), .x1(x1), .x4(x4), .x5(x5));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      x1 = $signed(W'($urandom));
      if (i % 500 == 0) x1 = (i % 1000 == 0) ? W'(32767) : W'(-32768);
      en = ($urandom_range(0, 3) != 0);
      #1;
      checks++;
      if (int'(x4) != int'(x1) + hist2 || int'(x5) != hist2 - int'(x1)) begin
        failures++;
        $display("FAIL i=%0d x1=%0d x4=%0d x5=%0d hist2=%0d", i, x1, x4, x5, hist2);
      end
      @(posedge clk);
      if (en) begin
        hist2 = hist1;
        hist1 = int'(x1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
