// tb_hcse4_gen: self-checking test of the four-pattern horizontal
// subexpression generator: s101 = 5x, s10n = 3x, s1001 = 9x, s100n = 7x for
// corner and random samples.
module tb_hcse4_gen;
  localparam int unsigned W = 16;

  logic signed [W-1:0] x1;
  logic signed [W+3:0] s101, s10n, s1001, s100n;
  int checks = 0, failures = 0;

  hcse4_gen #(.W_IN(W)) dut (.x1(x1), .s101(s101), .s10n(s10n), .s1001(s1001), .s100n(s100n));

  task automatic check(input int v);
    x1 = W'(v);
    #1;
    checks++;
    if (int'(s101) != 5 * v || int'(s10n) != 3 * v || int'(s1001) != 9 * v || int'(s100n) != 7 * v) begin
      failures++;
      $display("FAIL x=%0d: %0d %0d %0d %0d", v, s101, s10n, s1001, s100n);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0); check(1); check(-1); check(32767); check(-32768);
    repeat (2000) check(int'($signed(16'($urandom))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
