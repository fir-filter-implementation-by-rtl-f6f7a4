// tb_fir_hv_top: end-to-end test of the three filters in fir_hv_top (15-tap,
// 26-tap with 8-bit and with 16-bit coefficients), all parameters at their
// defaults.
//
// Each filter gets its own stimulus and its own checker. A checker samples
// the ports on every rising edge and compares them with the reference model
// of that filter: one clock after every accepted sample out_valid must be
// high and y_out must equal the exact convolution; otherwise out_valid
// must be low. The stimulus covers an impulse (checked against the
// coefficient lists), full-scale steps, a worst-case run that drives each
// output to its largest magnitude, random samples with random gaps in the
// strobes (different for each filter), and a reset in the middle of a
// stream. Back-to-back samples, gaps, the mid-stream reset and the extreme
// outputs are counted per filter and must each have happened.
module tb_fir_hv_top;
  localparam int unsigned W   = fir_hv_pkg::DEF_W_IN;
  localparam int unsigned WO1 = W + fir_hv_pkg::GROWTH;
  localparam int unsigned WO2 = W + fir_hv_pkg::EX1_GROWTH;
  localparam int unsigned WO3 = W + fir_hv_pkg::EX1W_GROWTH;
  localparam int N1 = fir15_ref_pkg::N;
  localparam int N2 = fir26_ref_pkg::N;

  logic clk = 1'b0, rst_n = 1'b0;
  logic v1 = 1'b0, v2 = 1'b0, v3 = 1'b0;
  logic signed [W-1:0] x1 = '0, x2 = '0, x3 = '0;
  logic                ov1, ov2, ov3;
  logic signed [WO1-1:0] y1;
  logic signed [WO2-1:0] y2;
  logic signed [WO3-1:0] y3;

  int checks = 0, failures = 0;
  int n_b2b[3], n_gap[3], n_worst[3], n_mid_reset = 0;
  int impulse_bad = 0;

  fir_hv_top dut (
    .clk(clk), .rst_n(rst_n),
    .f15_in_valid(v1), .f15_x_in(x1), .f15_out_valid(ov1), .f15_y_out(y1),
    .f26_in_valid(v2), .f26_x_in(x2), .f26_out_valid(ov2), .f26_y_out(y2),
    .f26w_in_valid(v3), .f26w_x_in(x3), .f26w_out_valid(ov3), .f26w_y_out(y3));

  always #5 clk = ~clk;

  function automatic int c1(input int k);
    return fir15_ref_pkg::coef(k);
  endfunction
  function automatic int c2(input int k);
    return fir26_ref_pkg::coef(k, 8);
  endfunction
  function automatic int c3(input int k);
    return fir26_ref_pkg::coef(k, 16);
  endfunction

  // ---- checker, 15-tap filter ----
  longint h1[N1];
  logic   p1 = 1'b0, pv1 = 1'b0;
  longint e1 = 0, worst1 = 0;
  always @(posedge clk) begin
    if (!rst_n) begin
      foreach (h1[k]) h1[k] = 0;
      p1 = 1'b0;
    end else begin
      checks++;
      if (ov1 !== p1 || (p1 && longint'(y1) != e1)) begin
        failures++;
        $display("FAIL f15 t=%0t valid=%b/%b y=%0d exp=%0d", $time, ov1, p1, y1, e1);
      end
      if (p1 && (e1 == worst1 || e1 == -worst1)) n_worst[0]++;
      if (v1 && pv1) n_b2b[0]++;
      if (!v1 && pv1) n_gap[0]++;
      pv1 = v1;
      p1 = v1;
      if (v1) begin
        for (int k = N1 - 1; k > 0; k--) h1[k] = h1[k - 1];
        h1[0] = longint'(x1);
        e1 = 0;
        for (int k = 0; k < N1; k++) e1 += longint'(c1(k)) * h1[k];
      end
    end
  end

  // ---- checker, 26-tap filter ----
  longint h2[N2];
  logic   p2 = 1'b0, pv2 = 1'b0;
  longint e2 = 0, worst2 = 0;
  always @(posedge clk) begin
    if (!rst_n) begin
      foreach (h2[k]) h2[k] = 0;
      p2 = 1'b0;
    end else begin
      checks++;
      if (ov2 !== p2 || (p2 && longint'(y2) != e2)) begin
        failures++;
        $display("FAIL f26 t=%0t valid=%b/%b y=%0d exp=%0d", $time, ov2, p2, y2, e2);
      end
      if (p2 && (e2 == worst2 || e2 == -worst2)) n_worst[1]++;
      if (v2 && pv2) n_b2b[1]++;
      if (!v2 && pv2) n_gap[1]++;
      pv2 = v2;
      p2 = v2;
      if (v2) begin
        for (int k = N2 - 1; k > 0; k--) h2[k] = h2[k - 1];
        h2[0] = longint'(x2);
        e2 = 0;
        for (int k = 0; k < N2; k++) e2 += longint'(c2(k)) * h2[k];
      end
    end
  end

  // ---- checker, 26-tap filter, 16-bit coefficients ----
  longint h3[N2];
  logic   p3 = 1'b0, pv3 = 1'b0;
  longint e3 = 0, worst3 = 0;
  always @(posedge clk) begin
    if (!rst_n) begin
      foreach (h3[k]) h3[k] = 0;
      p3 = 1'b0;
    end else begin
      checks++;
      if (ov3 !== p3 || (p3 && longint'(y3) != e3)) begin
        failures++;
        $display("FAIL f26w t=%0t valid=%b/%b y=%0d exp=%0d", $time, ov3, p3, y3, e3);
      end
      if (p3 && (e3 == worst3 || e3 == -worst3)) n_worst[2]++;
      if (v3 && pv3) n_b2b[2]++;
      if (!v3 && pv3) n_gap[2]++;
      pv3 = v3;
      p3 = v3;
      if (v3) begin
        for (int k = N2 - 1; k > 0; k--) h3[k] = h3[k - 1];
        h3[0] = longint'(x3);
        e3 = 0;
        for (int k = 0; k < N2; k++) e3 += longint'(c3(k)) * h3[k];
      end
    end
  end

  // ---- watchdog ----
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // All filters take a sample on the same clock (values may differ).
  task automatic send3(input logic signed [W-1:0] a, input logic signed [W-1:0] b,
                       input logic signed [W-1:0] c);
    @(negedge clk);
    x1 = a; v1 = 1'b1;
    x2 = b; v2 = 1'b1;
    x3 = c; v3 = 1'b1;
  endtask

  initial begin
    foreach (n_b2b[i]) begin
      n_b2b[i] = 0; n_gap[i] = 0; n_worst[i] = 0;
    end
    for (int k = 0; k < N1; k++) worst1 += longint'(c1(k)) * (c1(k) < 0 ? -1 : 1);
    for (int k = 0; k < N2; k++) worst2 += longint'(c2(k)) * (c2(k) < 0 ? -1 : 1);
    for (int k = 0; k < N2; k++) worst3 += longint'(c3(k)) * (c3(k) < 0 ? -1 : 1);
    worst1 *= 32767;
    worst2 *= 32767;
    worst3 *= 32767;

    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // Impulse into both; compare with the coefficient lists directly.
    send3(W'(1), W'(1), W'(1));
    for (int k = 0; k < N2; k++) begin
      @(posedge clk); #1;
      checks++;
      if (k < N1 && longint'(y1) != longint'(c1(k))) impulse_bad++;
      if (longint'(y2) != longint'(c2(k))) impulse_bad++;
      if (longint'(y3) != longint'(c3(k))) impulse_bad++;
      @(negedge clk);
      x1 = '0; x2 = '0; x3 = '0;
    end
    checks++;
    if (impulse_bad != 0) begin
      failures++;
      $display("FAIL impulse responses differ from the coefficients (%0d taps)", impulse_bad);
    end

    // Worst-case runs: full-scale samples carrying the coefficient signs.
    for (int i = 0; i < N2; i++)
      send3((i >= N2 - N1) ? ((c1(N2 - 1 - i) < 0) ? W'(-32767) : W'(32767)) : W'(0),
            (c2(N2 - 1 - i) < 0) ? W'(-32767) : W'(32767),
            (c3(N2 - 1 - i) < 0) ? W'(-32767) : W'(32767));
    for (int i = 0; i < N2; i++)
      send3((i >= N2 - N1) ? ((c1(N2 - 1 - i) < 0) ? W'(32767) : W'(-32767)) : W'(0),
            (c2(N2 - 1 - i) < 0) ? W'(32767) : W'(-32767),
            (c3(N2 - 1 - i) < 0) ? W'(32767) : W'(-32767));
    repeat (N2 + 2) send3(W'(-32768), W'(-32768), W'(-32768));

    // Random samples; each filter gets its own random gaps.
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      v1 = ($urandom_range(0, 4) != 0);
      v2 = ($urandom_range(0, 3) != 0);
      v3 = ($urandom_range(0, 2) != 0);
      x1 = $signed(W'($urandom));
      x2 = $signed(W'($urandom));
      x3 = $signed(W'($urandom));
    end

    // Reset in the middle of both streams.
    @(negedge clk);
    rst_n = 1'b0;
    n_mid_reset++;
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) send3($signed(W'($urandom)), $signed(W'($urandom)), $signed(W'($urandom)));
    @(negedge clk);
    v1 = 1'b0; v2 = 1'b0; v3 = 1'b0;
    repeat (3) @(negedge clk);

    $display("mechanisms: f15 back_to_back=%0d gap=%0d worst=%0d | f26 back_to_back=%0d gap=%0d worst=%0d | f26w back_to_back=%0d gap=%0d worst=%0d | mid_reset=%0d",
             n_b2b[0], n_gap[0], n_worst[0], n_b2b[1], n_gap[1], n_worst[1],
             n_b2b[2], n_gap[2], n_worst[2], n_mid_reset);
    checks++;
    if (n_b2b[0] == 0 || n_gap[0] == 0 || n_worst[0] < 2 || n_b2b[1] == 0 ||
        n_gap[1] == 0 || n_worst[1] < 2 || n_b2b[2] == 0 || n_gap[2] == 0 ||
        n_worst[2] < 2 || n_mid_reset == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
