// tb_clk_downsample: rate and evenness of the rational clock-enable divider.
//
// Stage 1 (default 285/400, input enable always on) must give exactly 285 output enables in
// every 400 clocks and never two missing enables in a row. Stage 2 (222/285), fed from
// stage 1, must give exactly 222 enables per 285 enables of its input.
module tb_clk_downsample;
  import ecg_soc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic m_en, l_en;
  int checks = 0, failures = 0;

  clk_downsample dut_m (.clk, .rst_n, .en_i(1'b1), .en_o(m_en));
  clk_downsample #(.NUM(LCLK_MHZ), .DEN(MCLK_MHZ)) dut_l (.clk, .rst_n, .en_i(m_en), .en_o(l_en));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m_cnt, l_cnt, in_l, gap, max_gap;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // stage 1: several whole periods of 400 clocks
    for (int p = 0; p < 20; p++) begin
      m_cnt = 0; gap = 0; max_gap = 0;
      for (int i = 0; i < int'(HCLK_MHZ); i++) begin
        @(posedge clk);
        if (m_en) begin m_cnt++; gap = 0; end
        else begin gap++; if (gap > max_gap) max_gap = gap; end
      end
      checks++;
      if (m_cnt != int'(MCLK_MHZ)) begin
        failures++;
        $display("period %0d: %0d MCLK ticks in %0d HCLK clocks", p, m_cnt, HCLK_MHZ);
      end
      checks++;
      if (max_gap > 1) begin
        failures++;
        $display("period %0d: %0d MCLK ticks missing in a row", p, max_gap);
      end
    end
    // stage 2: whole periods of 285 MCLK ticks
    for (int p = 0; p < 10; p++) begin
      l_cnt = 0; in_l = 0;
      while (in_l < int'(MCLK_MHZ)) begin
        @(posedge clk);
        if (m_en) in_l++;
        if (l_en) l_cnt++;
        if (l_en && !m_en) begin
          failures++;
          $display("LCLK tick without MCLK tick");
        end
      end
      checks++;
      if (l_cnt != int'(LCLK_MHZ)) begin
        failures++;
        $display("period %0d: %0d LCLK ticks in %0d MCLK ticks", p, l_cnt, MCLK_MHZ);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
