// tb_fir26_16bit: end-to-end test of the 26-tap Parks-McClellan filter
// built with 16-bit CSD coefficients (COEF_BITS = 16).
//
// A checker samples the ports on every rising edge and compares them with
// the reference model (direct convolution with coefficients derived from the
// real-valued design): one clock after every accepted sample out_valid must
// be high and y_out must equal sum(h(k) x(n-k)) exactly; in every other
// clock out_valid must be low. Phases: impulse (y_out must reproduce the 26
// coefficients), full-scale steps, a worst-case run (26 full-scale samples
// carrying the coefficient signs, output sum|h(k)| * 32767), random samples
// with random gaps, and a reset in the middle of a stream. Each mechanism
// is counted and must have happened at least once.
module tb_fir26_16bit;
  import fir26_ref_pkg::*;
  localparam int unsigned W = fir_hv_pkg::DEF_W_IN;
  localparam int unsigned WO = W + fir_hv_pkg::EX1W_GROWTH;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [W-1:0]  x_in = '0;
  logic                 out_valid;
  logic signed [WO-1:0] y_out;

  int checks = 0, failures = 0;
  int n_back_to_back = 0, n_gap = 0, n_mid_reset = 0, n_full_scale = 0;
  longint hist[N];
  logic   pending = 1'b0;
  longint pending_exp = 0;
  logic   prev_valid = 1'b0;
  longint full_pos, full_neg, worst;
  int n_worst = 0;

  fir26_hv_cse #(.COEF_BITS(16)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in),
    .out_valid(out_valid), .y_out(y_out));

  always #5 clk = ~clk;

  initial begin
    full_pos = 0;
    for (int k = 0; k < N; k++) full_pos += longint'(coef(k, 16));
    full_neg = -full_pos * 32768;
    worst = 0;
    for (int k = 0; k < N; k++) worst += longint'(coef(k, 16)) * (coef(k, 16) < 0 ? -1 : 1);
    worst = worst * 32767;
    full_pos = full_pos * 32767;
  end

  // Checker and reference model.
  always @(posedge clk) begin
    if (!rst_n) begin
      foreach (hist[k]) hist[k] = 0;
      pending = 1'b0;
    end else begin
      checks++;
      if (out_valid !== pending) begin
        failures++;
        $display("FAIL t=%0t out_valid=%b expected %b", $time, out_valid, pending);
      end else if (pending && longint'(y_out) != pending_exp) begin
        failures++;
        $display("FAIL t=%0t y_out=%0d expected %0d", $time, y_out, pending_exp);
      end
      if (pending && (pending_exp == full_pos || pending_exp == full_neg)) n_full_scale++;
      if (pending && pending_exp == worst) n_worst++;
      if (in_valid && prev_valid) n_back_to_back++;
      if (!in_valid && prev_valid) n_gap++;
      prev_valid = in_valid;
      if (in_valid) begin
        for (int k = N - 1; k > 0; k--) hist[k] = hist[k - 1];
        hist[0] = longint'(x_in);
        pending_exp = 0;
        for (int k = 0; k < N; k++) pending_exp += longint'(coef(k, 16)) * hist[k];
        pending = 1'b1;
      end else begin
        pending = 1'b0;
      end
    end
  end

  // Watchdog.
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic signed [W-1:0] v);
    @(negedge clk);
    x_in = v;
    in_valid = 1'b1;
  endtask

  task automatic idle(input int n);
    repeat (n) begin
      @(negedge clk);
      in_valid = 1'b0;
      x_in = $signed(W'($urandom));
    end
  endtask

  int impulse_ok;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // 1. Impulse: also checked directly against the coefficient list.
    impulse_ok = 1;
    send(W'(1));
    for (int k = 0; k < N; k++) begin
      @(posedge clk); #1;
      checks++;
      if (!out_valid || longint'(y_out) != longint'(coef(k, 16))) begin
        failures++;
        impulse_ok = 0;
        $display("FAIL impulse tap %0d y_out=%0d expected %0d", k, y_out, coef(k, 16));
      end
      @(negedge clk);
      x_in = '0;
    end
    idle(3);

    // 2. Full-scale steps.
    repeat (N + 2) send(W'(32767));
    repeat (N + 2) send(W'(-32768));
    repeat (N + 2) send(W'(0));
    for (int i = 0; i < N; i++) send(coef(N - 1 - i, 16) < 0 ? W'(-32767) : W'(32767));
    idle(2);

    // 3. Random samples with random gaps.
    for (int i = 0; i < 4000; i++) begin
      send($signed(W'($urandom)));
      if ($urandom_range(0, 4) == 0) idle($urandom_range(1, 3));
    end

    // 4. Reset in the middle of a stream.
    @(negedge clk);
    rst_n = 1'b0;
    in_valid = 1'b1;
    n_mid_reset++;
    @(negedge clk);
    rst_n = 1'b1;
    in_valid = 1'b0;
    for (int i = 0; i < 200; i++) send($signed(W'($urandom)));
    idle(3);

    $display("mechanisms: back_to_back=%0d gap=%0d mid_reset=%0d full_scale=%0d worst=%0d impulse_ok=%0d",
             n_back_to_back, n_gap, n_mid_reset, n_full_scale, n_worst, impulse_ok);
    checks++;
    if (n_back_to_back == 0 || n_gap == 0 || n_mid_reset == 0 || n_full_scale < 2 || n_worst == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
