// sd_adc: 14-bit sigma-delta ADC, the modulator followed by its decimation filter.
//
// The analogue ECG input, represented by its 14-bit value x_i, is converted into a 1-bit
// stream at the rate of the sampling clock (enable en) and averaged over 2**R_LOG2 sampling
// ticks into one 14-bit two's-complement sample. A new sample appears every 2**R_LOG2 ticks
// of the selected sampling clock: at HCLK that is every 2**R_LOG2 system clocks, at the slower
// clocks proportionally less often. valid_o pulses one clock per sample; bit_o is the raw stream.
//
// The split into modulator and digital filter, and the 14-bit resolution, follow the source
// design; the decimation ratio is this design's own choice (see decimation_filter).
module sd_adc
  import ecg_soc_pkg::*;
#(
  parameter int W      = ADC_W,
  parameter int R_LOG2 = ADC_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] x_i,
  output logic                bit_o,
  output logic signed [W-1:0] sample_o,
  output logic                valid_o
);
  sd_modulator #(.W(W)) u_mod (
    .clk, .rst_n, .en, .x_i, .bit_o
  );

  decimation_filter #(.W(W), .R_LOG2(R_LOG2)) u_dec (
    .clk, .rst_n, .en, .bit_i(bit_o), .sample_o, .valid_o
  );
endmodule
