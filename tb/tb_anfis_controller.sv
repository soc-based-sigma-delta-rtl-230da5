// tb_anfis_controller: the neuro-fuzzy clock decision against a floating-point model.
//
// The model computes F = |p(n)|, G = |p(n) - p(n-1)| (each saturated at its very-high
// centre), the bell grades 1 / (1 + ((x-c)/a)**2),
// the 25 products, y = sum(w * f) / sum(w) with consequents LCLK 0, MCLK 1, HCLK 2, and the
// nearest clock. For each sample the controller's y must lie within 3/256 of the model's,
// and its clock must match wherever the model's y is not within 4/256 of a threshold.
// Directed pairs cover every row and column of the rule table; random pairs follow. The
// decision must take no more than 800 clocks.
module tb_anfis_controller;
  import ecg_soc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic sample_valid = 1'b0;
  logic signed [ADC_W-1:0] sample_i;
  logic busy, done;
  clk_sel_e sel_o;
  logic [Y_Q+1:0] y_o;
  logic [ADC_W-1:0] f_o, g_o;
  int checks = 0, failures = 0;
  int seen [3];
  int prev = 0;

  anfis_controller dut (.clk, .rst_n, .sample_valid, .sample_i, .busy, .done, .sel_o, .y_o, .f_o, .g_o);

  always #5 clk = ~clk;

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real bell(real x, real c, real a);
    real t = (x - c) / a;
    return 1.0 / (1.0 + t * t);
  endfunction

  task automatic apply(input int p);
    int f, g, lat;
    real muf [NUM_MF], mug [NUM_MF], sw, swf, w, y;
    int exp_sel;
    f = p < 0 ? -p : p;
    g = p - prev < 0 ? prev - p : p - prev;
    prev = p;
    for (int i = 0; i < NUM_MF; i++) begin
      // features saturate at the very-high centre
      muf[i] = bell(real'(f > int'(F_CENTRE[NUM_MF-1]) ? int'(F_CENTRE[NUM_MF-1]) : f), real'(F_CENTRE[i]), real'(F_WIDTH));
      mug[i] = bell(real'(g > int'(G_CENTRE[NUM_MF-1]) ? int'(G_CENTRE[NUM_MF-1]) : g), real'(G_CENTRE[i]), real'(G_WIDTH));
    end
    sw = 0.0; swf = 0.0;
    for (int i = 0; i < NUM_MF; i++)
      for (int j = 0; j < NUM_MF; j++) begin
        w = muf[i] * mug[j];
        sw += w;
        swf += w * real'(consequent(RULES[i][j]));
      end
    y = swf / sw;
    exp_sel = y < 0.5 ? 0 : (y < 1.5 ? 1 : 2);

    sample_i = ADC_W'(p);
    sample_valid = 1'b1;
    @(posedge clk); #1;
    sample_valid = 1'b0;
    lat = 1;
    while (!done) begin @(posedge clk); #1; lat++; end
    checks++;
    if (lat > 800) begin failures++; $display("latency %0d", lat); end
    checks++;
    if (int'(f_o) != f || int'(g_o) != g) begin
      failures++;
      $display("features F=%0d G=%0d expected %0d %0d", f_o, g_o, f, g);
    end
    checks++;
    if (real'(y_o) / 256.0 - y > 3.0 / 256.0 || y - real'(y_o) / 256.0 > 3.0 / 256.0) begin
      failures++;
      $display("p=%0d F=%0d G=%0d y=%0d model %f", p, f, g, y_o, y * 256.0);
    end
    if ((y - 0.5 > 4.0 / 256.0 || 0.5 - y > 4.0 / 256.0) &&
        (y - 1.5 > 4.0 / 256.0 || 1.5 - y > 4.0 / 256.0)) begin
      checks++;
      seen[exp_sel]++;
      if (int'(sel_o) != exp_sel) begin
        failures++;
        $display("p=%0d F=%0d G=%0d sel=%0d expected %0d (y=%f)", p, f, g, sel_o, exp_sel, y);
      end
    end
    repeat ($urandom_range(0, 5)) @(posedge clk);
    #1;
  endtask

  // Drive a pair (previous, current) so that F and G hit given values.
  task automatic pair(input int f, input int g);
    apply(f - g);
    apply(f);
  endtask

  initial begin
    sample_i = '0;
    for (int i = 0; i < 3; i++) seen[i] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < NUM_MF; i++)
      for (int j = 0; j < NUM_MF; j++)
        pair(int'(F_CENTRE[i]) > 8191 ? 8191 : int'(F_CENTRE[i]), int'(G_CENTRE[j]));
    for (int n = 0; n < 300; n++) begin
      int base = int'($urandom_range(0, 16383)) - 8192;
      int step = int'($urandom_range(0, 48)) - 24;
      int nxt  = base + step;
      if (nxt > 8191) nxt = 8191;
      if (nxt < -8192) nxt = -8192;
      apply(base);
      apply(nxt);
    end
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("clock %0d never chosen", i); end
    end
    $display("chosen: LCLK %0d MCLK %0d HCLK %0d", seen[0], seen[1], seen[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
