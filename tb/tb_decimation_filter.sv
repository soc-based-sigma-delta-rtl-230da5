// tb_decimation_filter: checks the sinc1 decimator with a short window (2**8 clocks).
//
// Each window is fed a bit stream with a known number k of ones, spread at random, under a
// random enable. The expected sample is k * 2**14 / 256 - 8192, saturated to 8191 for
// k = 256; valid_o must pulse exactly once per 256 enabled clocks.
module tb_decimation_filter;
  import ecg_soc_pkg::*;

  localparam int RL = 8;
  localparam int R  = 1 << RL;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, bit_i = 1'b0, valid_o;
  logic signed [ADC_W-1:0] sample_o;
  int checks = 0, failures = 0;
  int expected_q[$];
  int ticks_since = 0;

  decimation_filter #(.W(ADC_W), .R_LOG2(RL)) dut (.clk, .rst_n, .en, .bit_i, .sample_o, .valid_o);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && valid_o) begin
    int e;
    checks++;
    if (expected_q.size() == 0) begin
      failures++;
      $display("unexpected valid");
    end else begin
      e = expected_q.pop_front();
      if (int'(sample_o) != e) begin
        failures++;
        $display("sample %0d expected %0d", sample_o, e);
      end
    end
  end

  task automatic window(input int k);
    bit pattern [R];
    int placed = 0, e;
    for (int i = 0; i < R; i++) pattern[i] = 1'b0;
    while (placed < k) begin
      int p = int'($urandom_range(0, R - 1));
      if (!pattern[p]) begin pattern[p] = 1'b1; placed++; end
    end
    e = k * (1 << ADC_W) / R - 8192;
    if (e > 8191) e = 8191;
    expected_q.push_back(e);
    for (int i = 0; i < R; i++) begin
      while ($urandom_range(0, 3) == 0) begin
        en = 1'b0; bit_i = $urandom_range(0, 1) != 0;
        @(posedge clk); #1;
      end
      en = 1'b1; bit_i = pattern[i];
      @(posedge clk); #1;
    end
    en = 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    window(128);
    window(0);
    window(256);
    window(1);
    window(255);
    for (int i = 0; i < 20; i++) window(int'($urandom_range(0, R)));
    repeat (5) @(posedge clk);
    checks++;
    if (expected_q.size() != 0) begin
      failures++;
      $display("%0d samples missing", expected_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
