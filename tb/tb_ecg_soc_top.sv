// tb_ecg_soc_top: the whole front end, end to end, at its default sizes (decimation 2**14).
//
// The input is a scripted sequence of levels, changed right after each ADC sample so that
// every decimation window sees one level:
//   baseline wander  0 / 8 alternating    -> amplitude very low, slope low   -> LCLK
//   P/T-wave level   4096 / 4104          -> amplitude medium, slope low     -> MCLK
//   R peak           7000 steady          -> amplitude high                  -> HCLK
//   flat line        0 steady             -> slope very low                  -> HCLK
//   baseline wander again                                                    -> LCLK
// Checks, against models written here:
//   - every ADC sample is within 3 LSB of the level of its window;
//   - each controller decision (y and clock) matches a floating-point ANFIS model;
//   - the multiplexer puts the decided clock in force within 4 clocks;
//   - ADC sample spacing over a window run wholly on one clock is 2**14 clocks on HCLK,
//     2**14 * 400/285 on MCLK and 2**14 * 400/222 on LCLK (within 2 clocks);
//   - refined outputs come every 2**14 clocks and stay within the range of recent samples.
// Mechanisms counted, each of which must occur: windows on each of the three clocks, clock
// switches up and down, and refined outputs that fall between two ADC samples.
module tb_ecg_soc_top;
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
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- stimulus: one level per ADC window ----
  int script[$];
  int level_q[$];       // level of each window, in order
  int idx = 0;

  initial begin
    for (int i = 0; i < 8; i++) script.push_back((i % 2) ? 8 : 0);
    for (int i = 0; i < 8; i++) script.push_back((i % 2) ? 4104 : 4096);
    for (int i = 0; i < 6; i++) script.push_back(7000);
    for (int i = 0; i < 6; i++) script.push_back(0);
    for (int i = 0; i < 8; i++) script.push_back((i % 2) ? 8 : 0);
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
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (windows_on[i] == 0) begin failures++; $display("no window on clock %0d", i); end
    end
    checks++;
    if (switches_up == 0 || switches_down == 0) begin failures++; $display("clock switch missing"); end
    checks++;
    if (interpolated == 0) begin failures++; $display("no interpolated output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
