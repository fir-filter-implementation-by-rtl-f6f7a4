// tb_hcse_gen: self-checking test of the horizontal subexpression generator.
// Drives corner values and random samples and checks x2s = 4*(x + x/4) = 5x
// and x3s = 4*(x - x/4) = 3x, computed here with plain integer arithmetic.
module tb_hcse_gen;
  localparam int unsigned W = 16;

  logic signed [W-1:0] x1;
  logic signed [W+2:0] x2s, x3s;
  int checks = 0, failures = 0;

  hcse_gen #(.W_IN(W)) dut (.x1(x1), .x2s(x2s), .x3s(x3s));

  task automatic check(input int v);
    x1 = W'(v);
    #1;
    checks++;
    if (int'(x2s) != 5 * v || int'(x3s) != 3 * v) begin
      failures++;
      $display("FAIL x1=%0d x2s=%0d (exp %0d) x3s=%0d (exp %0d)", v, x2s, 5 * v, x3s, 3 * v);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0); check(1); check(-1); check(32767); check(-32768); check(12345);
    repeat (2000) check(int'($signed(16'($urandom))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
