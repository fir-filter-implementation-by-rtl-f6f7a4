// tb_fir26_response: frequency-response test of the 26-tap low-pass filter
// (pass band up to 0.2*pi, stop band from 0.25*pi) for both coefficient
// widths, COEF_BITS = 8 and COEF_BITS = 16, run side by side.
//
// Each filter is fed a continuous sine of amplitude 16000 at one test
// frequency after another. Every output sample is compared exactly with the
// direct convolution of the reference coefficients. After the 26-sample
// settling time, the output amplitude is measured by correlating 200 samples
// (a whole number of periods at every test frequency) with sin and cos. The
// measured gain must match |H(w)| of the quantised reference coefficients
// to within 0.01. It must also show low-pass behaviour: gain above 0.8 at
// 0.1*pi and 0.2*pi, and below 0.06 at 0.4*pi and 0.5*pi. Each phase is
// counted: exact samples, gain matches, pass-band and stop-band checks.
module tb_fir26_response;
  import fir26_ref_pkg::*;
  localparam int unsigned W = fir_hv_pkg::DEF_W_IN;
  localparam int unsigned WO8 = W + fir_hv_pkg::EX1_GROWTH;
  localparam int unsigned WO16 = W + fir_hv_pkg::EX1W_GROWTH;
  localparam real PI = 3.14159265358979;
  localparam real AMP = 16000.0;
  localparam int SETTLE = 40;
  localparam int WIN = 200;
  localparam int NF = 4;
  localparam real FREQ [NF] = '{0.1, 0.2, 0.4, 0.5};

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [W-1:0]    x_in = '0;
  logic                   v8, v16;
  logic signed [WO8-1:0]  y8;
  logic signed [WO16-1:0] y16;

  int checks = 0, failures = 0;
  int n_exact = 0, n_gain = 0, n_pass = 0, n_stop = 0;
  longint hist[N];
  longint exp8, exp16;
  logic   pending = 1'b0;

  fir26_hv_cse #(.COEF_BITS(8)) dut8 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in),
    .out_valid(v8), .y_out(y8));
  fir26_hv_cse #(.COEF_BITS(16)) dut16 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in),
    .out_valid(v16), .y_out(y16));

  always #5 clk = ~clk;

  // |H(w)| of the quantised reference coefficients, w in units of pi.
  function automatic real ref_gain(input real w, input int bits);
    real re = 0.0, im = 0.0;
    for (int k = 0; k < N; k++) begin
      re += real'(coef(k, bits)) * $cos(w * PI * real'(k));
      im -= real'(coef(k, bits)) * $sin(w * PI * real'(k));
    end
    return $sqrt(re * re + im * im) / real'(longint'(1) << bits);
  endfunction

  function automatic real absr(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // Exact checker, sampled on every rising edge.
  always @(posedge clk) begin
    if (!rst_n) begin
      foreach (hist[k]) hist[k] = 0;
      pending = 1'b0;
    end else begin
      checks++;
      if (v8 !== pending || v16 !== pending) begin
        failures++;
        $display("FAIL t=%0t out_valid=%b/%b expected %b", $time, v8, v16, pending);
      end else if (pending) begin
        if (longint'(y8) != exp8 || longint'(y16) != exp16) begin
          failures++;
          $display("FAIL t=%0t y=%0d/%0d expected %0d/%0d", $time, y8, y16, exp8, exp16);
        end else begin
          n_exact++;
        end
      end
      if (in_valid) begin
        for (int k = N - 1; k > 0; k--) hist[k] = hist[k - 1];
        hist[0] = longint'(x_in);
        exp8 = 0;
        exp16 = 0;
        for (int k = 0; k < N; k++) begin
          exp8 += longint'(coef(k, 8)) * hist[k];
          exp16 += longint'(coef(k, 16)) * hist[k];
        end
        pending = 1'b1;
      end else begin
        pending = 1'b0;
      end
    end
  end

  // Watchdog.
  initial begin
    #2ms;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic check_gain(input string name, input real w, input real meas,
                            input real expect_g);
    checks++;
    if (absr(meas - expect_g) > 0.01) begin
      failures++;
      $display("FAIL %s w=%.2f*pi gain=%.4f expected %.4f", name, w, meas, expect_g);
    end else begin
      n_gain++;
    end
    checks++;
    if (w <= 0.2) begin
      if (meas < 0.8) begin
        failures++;
        $display("FAIL %s pass band w=%.2f*pi gain=%.4f", name, w, meas);
      end else n_pass++;
    end else begin
      if (meas > 0.06) begin
        failures++;
        $display("FAIL %s stop band w=%.2f*pi gain=%.4f", name, w, meas);
      end else n_stop++;
    end
    $display("%s w=%.2f*pi measured gain %.4f, reference %.4f", name, w, meas, expect_g);
  endtask

  initial begin
    real c8, s8, c16, s16, w, g8, g16;
    int n;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < NF; f++) begin
      w = FREQ[f];
      c8 = 0.0; s8 = 0.0; c16 = 0.0; s16 = 0.0;
      n = 0;
      repeat (SETTLE + WIN + 1) begin
        @(negedge clk);
        // Outputs now hold the response to sample n-1.
        if (in_valid && n - 1 >= SETTLE) begin
          c8 += real'(y8) * $cos(w * PI * real'(n - 1));
          s8 += real'(y8) * $sin(w * PI * real'(n - 1));
          c16 += real'(y16) * $cos(w * PI * real'(n - 1));
          s16 += real'(y16) * $sin(w * PI * real'(n - 1));
        end
        if (n < SETTLE + WIN) begin
          in_valid = 1'b1;
          x_in = W'($rtoi(AMP * $sin(w * PI * real'(n)) + (AMP * $sin(w * PI * real'(n)) < 0.0 ? -0.5 : 0.5)));
        end else begin
          in_valid = 1'b0;
        end
        n++;
      end
      g8 = 2.0 * $sqrt(c8 * c8 + s8 * s8) / real'(WIN) / AMP / 256.0;
      g16 = 2.0 * $sqrt(c16 * c16 + s16 * s16) / real'(WIN) / AMP / 65536.0;
      check_gain("8-bit", w, g8, ref_gain(w, 8));
      check_gain("16-bit", w, g16, ref_gain(w, 16));
      repeat (2) @(negedge clk);
    end
    $display("mechanisms: exact_samples=%0d gain_matches=%0d pass_band=%0d stop_band=%0d",
             n_exact, n_gain, n_pass, n_stop);
    checks++;
    if (n_exact < 4 * WIN || n_gain != 2 * NF || n_pass != 4 || n_stop != 4) begin
      failures++;
      $display("FAIL not every phase completed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
