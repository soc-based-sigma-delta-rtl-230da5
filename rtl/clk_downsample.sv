// clk_downsample: rational clock-rate reduction, expressed as a clock enable.
//
// The output enable en_o fires on NUM of every DEN input enables, spread as evenly as
// possible by a phase accumulator: each input enable adds NUM to the phase, and when the phase
// reaches DEN it wraps (subtracting DEN) and en_o fires in that same clock. The average
// output rate is exactly NUM/DEN of the input rate; single gaps are at most one input period
// longer than the average.
//
// Interface: en_i is the faster clock (a constant 1 for the system clock itself). en_o is
// combinational from en_i and the registered phase, so the two stages can be chained in
// one clock domain with no added latency.
//
// From the source design: two cascaded down-sampling stages, HCLK to MCLK and MCLK to LCLK,
// at 400, 285 and 222 MHz, so the defaults are NUM/DEN = 285/400. Building the slower clocks
// as enables of the one fast clock, instead of as separately filtered and decimated clock
// waveforms, is this design's own choice.
module clk_downsample
  import ecg_soc_pkg::*;
#(
  parameter int unsigned NUM = MCLK_MHZ,
  parameter int unsigned DEN = HCLK_MHZ
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en_i,
  output logic en_o
);
  localparam int PW = $clog2(DEN + NUM + 1);

  logic [PW-1:0] phase_q;
  logic [PW-1:0] phase_sum;

  always_comb begin
    phase_sum = phase_q + PW'(NUM);
    en_o      = en_i && (phase_sum >= PW'(DEN));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    phase_q <= '0;
    else if (en_i) phase_q <= en_o ? phase_sum - PW'(DEN) : phase_sum;
  end

  initial assert (NUM > 0 && NUM <= DEN) else $error("clk_downsample needs 0 < NUM <= DEN");
  // a derived tick is always a tick of the input clock
  assert property (@(posedge clk) disable iff (!rst_n) en_o |-> en_i)
    else $error("clk_downsample: output tick without input tick");
endmodule
