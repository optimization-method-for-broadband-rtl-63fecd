// End-to-end testbench for cse_fir at its default size: the 64-tap
// root-raised-cosine filter, 10-bit input, 16-bit output.
//
// 1. The coefficient set is recomputed here from the pulse formula with real
//    arithmetic, rounded to multiples of 1/512, and compared with the table
//    the filter is built from.
// 2. The filter is driven through: impulses of both signs (the output must
//    trace the coefficients), full-scale positive and negative steps (the
//    output must settle at the DC gain), the input sequence that drives the
//    exact sum to its largest magnitude in both directions (no overflow
//    anywhere), random samples, and an asynchronous reset in mid-stream
//    (the delay line must empty), and two tones, one in the pass band and
//    one in the stop band (the second must come out at least 40 dB lower).
// Every cycle the output is compared with floor(sum_k c[k] x[n-k] / 128)
// computed from a history of the inputs; the output belongs to the sample
// applied in the same cycle. Each of the listed situations is counted and a
// failure is counted for any that never happened.
module tb_cse_fir;
  localparam int  N      = 64;
  localparam int  X_W    = 10;
  localparam int  OUT_W  = 16;
  localparam int  SHIFT  = 7;      // 23-bit exact sum -> 16-bit output
  localparam real ALPHA  = 0.3;
  localparam real SPS    = 8.0;
  localparam real PI     = 3.14159265358979323846;

  logic clk;
  logic rst_n;
  logic signed [X_W-1:0]   x;
  logic signed [OUT_W-1:0] y;

  int coef [N];
  int xh [N];          // xh[k] = x[n-k]
  int checks = 0;
  int failures = 0;
  int n_impulse = 0, n_step = 0, n_peak = 0, n_reset = 0, n_random = 0;
  int n_pass = 0, n_stop = 0;

  cse_fir dut (.clk(clk), .rst_n(rst_n), .x(x), .y(y));

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rrc(real t);
    if (t == 0.0) return 1.0 - ALPHA + 4.0 * ALPHA / PI;
    return ($sin(PI * t * (1.0 - ALPHA)) + 4.0 * ALPHA * t * $cos(PI * t * (1.0 + ALPHA)))
           / (PI * t * (1.0 - (4.0 * ALPHA * t) ** 2));
  endfunction

  function automatic int expected();
    longint s = 0;
    for (int k = 0; k < N; k++) s += longint'(coef[k]) * xh[k];
    return int'(s >>> SHIFT);
  endfunction

  function automatic longint exact_sum();
    longint s = 0;
    for (int k = 0; k < N; k++) s += longint'(coef[k]) * xh[k];
    return s;
  endfunction

  // apply one sample at the falling edge and check the output
  task automatic sample(int v);
    @(negedge clk);
    for (int k = N - 1; k > 0; k--) xh[k] = xh[k-1];
    xh[0] = v;
    x = X_W'(v);
    #1;
    checks++;
    if (int'(y) != expected()) begin
      failures++;
      if (failures <= 10) $display("FAIL x=%0d y=%0d expected %0d", v, y, expected());
    end
  endtask

  task automatic clear_hist();
    for (int k = 0; k < N; k++) xh[k] = 0;
  endtask

  initial begin
    // --- coefficient table against the pulse formula
    begin
      automatic real g [N];
      automatic real gmax = 0.0;
      for (int k = 0; k < N; k++) begin
        g[k] = rrc((real'(k) - 31.5) / SPS);
        if ((g[k] < 0.0 ? -g[k] : g[k]) > gmax) gmax = (g[k] < 0.0 ? -g[k] : g[k]);
      end
      for (int k = 0; k < N; k++) begin
        coef[k] = $rtoi(g[k] / gmax * 512.0 + (g[k] >= 0.0 ? 0.5 : -0.5));
        checks++;
        if (coef[k] != fir_cse_pkg::RRC_COEF[k]) begin
          failures++;
          $display("FAIL coefficient %0d: formula %0d table %0d", k, coef[k],
                   fir_cse_pkg::RRC_COEF[k]);
        end
      end
    end

    rst_n = 1'b0;
    x = '0;
    clear_hist();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // --- impulses: output traces 2*c[k] and -4*c[k]
    for (int s = 0; s < 2; s++) begin
      automatic int amp = (s == 0) ? 256 : -512;
      automatic int ok = 1;
      sample(amp);
      if (int'(y) != amp / 128 * coef[0]) ok = 0;
      for (int k = 1; k < N; k++) begin
        sample(0);
        if (int'(y) != amp / 128 * coef[k]) ok = 0;
      end
      repeat (4) sample(0);
      checks++;
      if (ok == 0) begin failures++; $display("FAIL impulse %0d", amp); end
      else n_impulse++;
    end

    // --- full-scale steps
    for (int s = 0; s < 2; s++) begin
      automatic int amp = (s == 0) ? 511 : -512;
      repeat (N + 2) sample(amp);
      checks++;
      if (int'(y) != (amp * 3820) >>> SHIFT) begin
        failures++; $display("FAIL step %0d settled at %0d", amp, y);
      end else n_step++;
    end

    // --- largest magnitude of the exact sum, both signs
    for (int s = 0; s < 2; s++) begin
      for (int j = 0; j < N; j++) begin
        automatic int c = coef[N - 1 - j];
        automatic int v = ((c >= 0) == (s == 0)) ? 511 : -511;
        sample(v);
      end
      checks++;
      if (exact_sum() != ((s == 0) ? 511 * 5800 : -511 * 5800)) begin
        failures++; $display("FAIL peak sequence did not reach full magnitude");
      end else n_peak++;
    end

    // --- tones: one in the pass band (f = 0.02 fs), one in the stop band
    //     (f = 0.2 fs); peak output after the 64-sample transient.
    //     Expected pass-band peak: 400 * 3820 / 128 = 11937.
    for (int s = 0; s < 2; s++) begin
      automatic real f = (s == 0) ? 0.02 : 0.2;
      automatic int peak = 0;
      for (int n = 0; n < 400; n++) begin
        sample($rtoi($floor(400.0 * $sin(2.0 * PI * f * real'(n)) + 0.5)));
        if (n >= N && (y < 0 ? -int'(y) : int'(y)) > peak) peak = (y < 0 ? -int'(y) : int'(y));
      end
      checks++;
      if (s == 0 && (peak < 11600 || peak > 12000)) begin
        failures++; $display("FAIL pass-band tone peak %0d", peak);
      end else if (s == 1 && peak > 119) begin      // at least 40 dB down
        failures++; $display("FAIL stop-band tone peak %0d", peak);
      end else if (s == 0) n_pass++;
      else n_stop++;
      $display("tone f=%0.2f fs: output peak %0d", f, peak);
    end

    // --- random samples with a reset in the middle
    for (int n = 0; n < 3000; n++) begin
      if (n == 1500) begin
        @(negedge clk);
        x = '0;              // the next edge then loads silence, as after reset
        rst_n = 1'b0;
        #1;
        rst_n = 1'b1;
        clear_hist();
        n_reset++;
      end
      sample(int'($urandom_range(1023)) - 512);
      n_random++;
    end

    // --- every situation must have happened
    checks++;
    if (n_impulse < 2 || n_step < 2 || n_peak < 2 || n_reset < 1 || n_random < 1 ||
        n_pass < 1 || n_stop < 1) begin
      failures++;
      $display("FAIL coverage: impulse %0d step %0d peak %0d reset %0d random %0d pass %0d stop %0d",
               n_impulse, n_step, n_peak, n_reset, n_random, n_pass, n_stop);
    end
    $display("coverage: impulse %0d step %0d peak %0d reset %0d random %0d pass %0d stop %0d",
             n_impulse, n_step, n_peak, n_reset, n_random, n_pass, n_stop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
