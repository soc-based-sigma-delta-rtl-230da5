// tb_ecg_workload: the whole front end on a synthetic ECG, at default sizes.
//
// The input is 1000 samples of a synthetic ECG at 360 samples/s (the MIT-BIH sampling rate):
// beats of 300 samples built from Gaussian P, Q, R, S and T waves (R peak 7000 LSB,
// T wave 2500, P wave 800) on a slow baseline wander. Time is compressed: each ECG sample is
// held for one ADC decimation window instead of the ~68 windows that real time would give
// on HCLK, so that the controller sees the sample-to-sample slope of the 360 samples/s record.
// Checks, against models written here: every ADC sample within 3 LSB of its level, every
// controller decision against a floating-point ANFIS model, the multiplexer following the
// decision, sample spacing on each clock, and the refined output grid. It reports how many
// windows ran on each clock and the average ADC power relative to running always on HCLK,
// weighting the clocks by the power figures 5.4, 3.08 and 1.4 quoted for HCLK, MCLK, LCLK.
// It must see windows on HCLK and on at least one slower clock.
module tb_ecg_workload;
  import ecg_soc_pkg::*;

  localparam int R = 1 << ADC_W;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [ADC_W-1:0] x_i;
  logic samp_en, adc_valid, anfis_done, out_valid;
  clk_sel_e sel_o;
  logic signed [ADC_W-1:0] adc_sample;
  logic signed [OUT_W-1:0] out_sample;
  logic [Y_Q+1:0] anfis_y;

  ecg_soc_top dut (.clk, .rst_n, .x_i, .samp_en, .sel_o, .adc_sample, .adc_valid,
                   .anfis_done, .anfis_y, .out_sample, .out_valid);

  int checks = 0, failures = 0;
  int windows_on [3];
  int switches_up = 0, switches_down = 0, interpolated = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (60000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- stimulus: one level per ADC window ----
  int script[$];
  int level_q[$];       // level of each window, in order
  int idx = 0;

  function automatic real gauss(real n, real c, real s);
    return $exp(-((n - c) * (n - c)) / (2.0 * s * s));
  endfunction

  initial begin
    for (int n = 0; n < 1000; n++) begin
      real t = real'(n % 300), v;
      v = 800.0 * gauss(t, 60.0, 10.0) - 600.0 * gauss(t, 100.0, 3.0) + 7000.0 * gauss(t, 108.0, 4.0)
        - 1500.0 * gauss(t, 116.0, 4.0) + 2500.0 * gauss(t, 200.0, 20.0)
        + 400.0 * $sin(2.0 * 3.14159265 * real'(n) / 1000.0);
      script.push_back(int'(v));
    end
  end

  // ---- floating-point ANFIS model ----
  function automatic real bell(real x, real c, real a);
    real t = (x - c) / a;
    return 1.0 / (1.0 + t * t);
  endfunction

  function automatic real anfis_y_model(int p, int prev);
    int f = p < 0 ? -p : p;
    int g = p > prev ? p - prev : prev - p;
    real sw = 0.0, swf = 0.0, w;
    if (f > int'(F_CENTRE[NUM_MF-1])) f = int'(F_CENTRE[NUM_MF-1]);   // saturate at very high
    if (g > int'(G_CENTRE[NUM_MF-1])) g = int'(G_CENTRE[NUM_MF-1]);
    for (int i = 0; i < NUM_MF; i++)
      for (int j = 0; j < NUM_MF; j++) begin
        w = bell(real'(f), real'(F_CENTRE[i]), real'(F_WIDTH)) *
            bell(real'(g), real'(G_CENTRE[j]), real'(G_WIDTH));
        sw += w;
        swf += w * real'(consequent(RULES[i][j]));
      end
    return swf / sw;
  endfunction

  // ---- monitors ----
  longint cyc = 0;
  always @(posedge clk) cyc++;

  int prev_sample = 0;
  real y_exp;
  int sel_exp = int'(SEL_HCLK);
  bit sel_check_pending = 0;
  longint decided_at;

  longint last_valid = -1;
  bit window_clean = 0;          // one clock in force throughout the current window
  clk_sel_e window_sel;
  int recent [$];
  longint last_out = -1;

  always @(posedge clk) if (rst_n) begin
    // ADC samples
    if (adc_valid) begin
      int lvl;
      checks++;
      lvl = level_q.size() ? level_q.pop_front() : 0;
      if (int'(adc_sample) - lvl > 3 || lvl - int'(adc_sample) > 3) begin
        failures++;
        $display("ADC sample %0d, window level %0d", adc_sample, lvl);
      end
      // spacing on a single clock
      if (last_valid >= 0 && window_clean) begin
        real ideal;
        longint d;
        d = cyc - last_valid;
        windows_on[int'(window_sel)]++;
        ideal = window_sel == SEL_LCLK ? real'(R) * HCLK_MHZ / LCLK_MHZ :
                window_sel == SEL_MCLK ? real'(R) * HCLK_MHZ / MCLK_MHZ : real'(R);
        checks++;
        if (real'(d) - ideal > 2.0 || ideal - real'(d) > 2.0) begin
          failures++;
          $display("spacing %0d on clock %0d, expected %f", d, window_sel, ideal);
        end
      end
      last_valid = cyc;
      window_clean = 1;
      window_sel = sel_o;
      y_exp = anfis_y_model(int'(adc_sample), prev_sample);
      prev_sample = int'(adc_sample);
      recent.push_back(int'(adc_sample));
      if (recent.size() > 3) void'(recent.pop_front());
    end else if (sel_o != window_sel) begin
      window_clean = 0;
    end

    // controller decisions
    if (anfis_done) begin
      checks++;
      if (real'(anfis_y) / 256.0 - y_exp > 4.0 / 256.0 || y_exp - real'(anfis_y) / 256.0 > 4.0 / 256.0) begin
        failures++;
        $display("controller y=%0d, model %f", anfis_y, y_exp * 256.0);
      end
      sel_exp = y_exp < 0.5 ? 0 : (y_exp < 1.5 ? 1 : 2);
      sel_check_pending = 1;
      decided_at = cyc;
    end else if (sel_check_pending && cyc - decided_at >= 4) begin
      sel_check_pending = 0;
      checks++;
      if (int'(sel_o) != sel_exp) begin
        failures++;
        $display("clock in force %0d, decided %0d", sel_o, sel_exp);
      end
    end

    // refined output
    if (out_valid) begin
      int lo, hi, o;
      lo = 8191;
      hi = -8192;
      if (last_out >= 0) begin
        checks++;
        if (cyc - last_out != R) begin failures++; $display("output spacing %0d", cyc - last_out); end
      end
      last_out = cyc;
      foreach (recent[i]) begin
        if (recent[i] < lo) lo = recent[i];
        if (recent[i] > hi) hi = recent[i];
      end
      if (recent.size() == 3) begin
        o = int'(out_sample);
        checks++;
        if (o < 4 * (lo - 1) || o > 4 * (hi + 1)) begin
          failures++;
          $display("refined output %0d outside samples %0d..%0d", o, lo, hi);
        end
        if (o != 4 * recent[2] && o != 4 * recent[1] && o != 4 * recent[0]) interpolated++;
      end
    end
  end

  // clock switches
  clk_sel_e sel_prev = SEL_HCLK;
  always @(posedge clk) if (rst_n) begin
    if (sel_o != sel_prev) begin
      if (consequent(sel_o) > consequent(sel_prev)) switches_up++;
      else switches_down++;
    end
    sel_prev <= sel_o;
  end

  // level changes right after each ADC sample
  always @(posedge clk) if (rst_n && adc_valid) begin
    #1;
    if (idx < script.size()) begin
      x_i = ADC_W'(script[idx]);
      idx++;
    end
    level_q.push_back(int'(x_i));
  end

  initial begin
    for (int i = 0; i < 3; i++) windows_on[i] = 0;
    x_i = '0;
    level_q.push_back(0);       // first window after reset
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (idx == script.size());
    repeat (2) @(posedge clk iff adc_valid);
    repeat (2) @(posedge clk iff out_valid);
    $display("windows on LCLK %0d MCLK %0d HCLK %0d; switches up %0d down %0d; interpolated outputs %0d",
             windows_on[0], windows_on[1], windows_on[2], switches_up, switches_down, interpolated);
    begin
      real tot, pw;
      tot = real'(windows_on[0] + windows_on[1] + windows_on[2]);
      pw = (1.4 * windows_on[0] + 3.08 * windows_on[1] + 5.4 * windows_on[2]) / (5.4 * tot);
      $display("average ADC power relative to always-HCLK: %f", pw);
    end
    checks++;
    if (windows_on[SEL_HCLK] == 0 || windows_on[SEL_MCLK] + windows_on[SEL_LCLK] == 0) begin
      failures++;
      $display("the clock never adapted");
    end
    checks++;
    if (switches_up == 0 || switches_down == 0) begin failures++; $display("clock switch missing"); end
    checks++;
    if (interpolated == 0) begin failures++; $display("no interpolated output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
