// ecg_soc_top: ECG front end with a sigma-delta ADC whose sampling clock is chosen by a
// neuro-fuzzy controller.
//
// Data path: the ECG input x_i (the analogue signal, represented by its 14-bit value) is
// converted by the sigma-delta ADC; each 14-bit sample goes to the ANFIS controller, which
// decides from the sample's amplitude and slope whether the next samples are taken on HCLK,
// MCLK or LCLK, and to the interpolation filter, which rebuilds a 16-bit signal on the
// HCLK sample grid. Clock path: HCLK is the system clock (clk); two down-sampling stages
// derive MCLK (285/400 of HCLK) and LCLK (222/285 of MCLK) as clock enables; a 4-to-1
// multiplexer, steered by the controller, passes one of them to the ADC as its adaptive
// sampling clock. In flat, low-amplitude stretches of the signal the ADC thus runs slower
// and spends less power; steep or large stretches are sampled at the full rate.
//
// Interface: one clock domain, clk = HCLK, asynchronous active-low reset. adc_valid marks
// each ADC sample, sel_o the clock in force, samp_en the adaptive sampling clock,
// out_valid/out_sample the refined output (one sample per 2**R_LOG2 clocks, Q14.2).
// The PLL that makes HCLK is outside: clk is its output.
//
// The block set and its wiring follow the source design's system block diagram. Running
// everything on HCLK with enables instead of three clock trees, and feeding the
// multiplexer's fourth input with HCLK, are this design's own choices.
module ecg_soc_top
  import ecg_soc_pkg::*;
#(
  parameter int R_LOG2 = ADC_W                    // ADC decimation ratio, log2
) (
  input  logic                    clk,            // HCLK
  input  logic                    rst_n,
  input  logic signed [ADC_W-1:0] x_i,            // ECG input
  output logic                    samp_en,        // adaptive sampling clock of the ADC
  output clk_sel_e                sel_o,          // sampling clock in force
  output logic signed [ADC_W-1:0] adc_sample,
  output logic                    adc_valid,
  output logic                    anfis_done,     // controller has a new decision
  output logic [Y_Q+1:0]          anfis_y,        // its defuzzified output, Q.8
  output logic signed [OUT_W-1:0] out_sample,
  output logic                    out_valid
);
  logic     mclk_en, lclk_en;
  logic     adc_bit;
  clk_sel_e anfis_sel;
  logic     anfis_busy;
  logic [ADC_W-1:0] anfis_f, anfis_g;

  // Down-sampling stages: HCLK -> MCLK -> LCLK.
  clk_downsample #(.NUM(MCLK_MHZ), .DEN(HCLK_MHZ)) u_ds_m (
    .clk, .rst_n, .en_i(1'b1), .en_o(mclk_en)
  );
  clk_downsample #(.NUM(LCLK_MHZ), .DEN(MCLK_MHZ)) u_ds_l (
    .clk, .rst_n, .en_i(mclk_en), .en_o(lclk_en)
  );

  // Sampling-clock multiplexer: inputs in select-code order L, M, H, spare (= H).
  clk_mux4 u_mux (
    .clk, .rst_n,
    .clk_en_i({1'b1, 1'b1, mclk_en, lclk_en}),
    .sel_i(anfis_sel), .sel_o, .clk_en_o(samp_en)
  );

  sd_adc #(.W(ADC_W), .R_LOG2(R_LOG2)) u_adc (
    .clk, .rst_n, .en(samp_en), .x_i, .bit_o(adc_bit),
    .sample_o(adc_sample), .valid_o(adc_valid)
  );

  anfis_controller #(.W(ADC_W)) u_anfis (
    .clk, .rst_n, .sample_valid(adc_valid), .sample_i(adc_sample),
    .busy(anfis_busy), .done(anfis_done), .sel_o(anfis_sel),
    .y_o(anfis_y), .f_o(anfis_f), .g_o(anfis_g)
  );

  interp_filter #(.W(ADC_W), .OW(OUT_W), .OUT_LOG2(R_LOG2)) u_interp (
    .clk, .rst_n, .in_valid(adc_valid), .in_sample(adc_sample),
    .out_valid, .out_sample
  );
endmodule
