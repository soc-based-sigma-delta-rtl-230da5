// tb_clk_mux4: the sampling-clock multiplexer under random enables and selects.
//
// A reference register follows the rule "a new select is taken over on a clock in which the
// newly selected input ticks"; the output must equal the referenced input on every clock,
// and every select code, including the spare one, must be used.
module tb_clk_mux4;
  import ecg_soc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] en_i;
  clk_sel_e sel_i, sel_o, ref_sel;
  logic en_o;
  int checks = 0, failures = 0;
  int used [4];

  clk_mux4 dut (.clk, .rst_n, .clk_en_i(en_i), .sel_i, .sel_o, .clk_en_o(en_o));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en_i = '0;
    sel_i = SEL_HCLK;
    ref_sel = SEL_HCLK;
    for (int i = 0; i < 4; i++) used[i] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 20000; n++) begin
      en_i = 4'($urandom());
      if ($urandom_range(0, 49) == 0) sel_i = clk_sel_e'($urandom_range(0, 3));
      #1;
      checks++;
      if (sel_o != ref_sel || en_o != en_i[ref_sel]) begin
        failures++;
        $display("n=%0d sel_o=%0d ref=%0d en_o=%b en_i=%b", n, sel_o, ref_sel, en_o, en_i);
      end
      used[ref_sel]++;
      @(posedge clk);
      if (sel_i != ref_sel && en_i[sel_i]) ref_sel = sel_i;
      #1;
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (used[i] == 0) begin
        failures++;
        $display("select %0d never used", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
