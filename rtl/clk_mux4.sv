// clk_mux4: 4-to-1 multiplexer that picks the ADC sampling clock.
//
// Its four inputs are the clock enables of LCLK, MCLK, HCLK and a spare fourth input; the
// two select lines come from the fuzzy controller. The select is registered here and a new
// select is taken over on a clock in which the newly selected input ticks, so the new clock
// starts in step with its own tick pattern. The output is the adaptive sampling clock of
// the ADC.
//
// Interface: clk_en_i[k] is the enable selected by code k (see clk_sel_e); sel_i may change
// at any clock; sel_o shows the select in force; clk_en_o is combinational from clk_en_i.
//
// From the source design: a 4x1 multiplexer with two select lines, its inputs HCLK, MCLK and
// LCLK and its select the controller's output. What feeds the fourth input, and the switching
// rule, are this design's own choices.
module clk_mux4
  import ecg_soc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic [3:0] clk_en_i,
  input  clk_sel_e sel_i,
  output clk_sel_e sel_o,
  output logic     clk_en_o
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                      sel_o <= SEL_HCLK;
    else if (sel_i != sel_o && clk_en_i[sel_i])      sel_o <= sel_i;
  end

  always_comb clk_en_o = clk_en_i[sel_o];
endmodule
