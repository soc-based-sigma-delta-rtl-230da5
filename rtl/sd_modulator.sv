// sd_modulator: first-order sigma-delta modulator, the loop of the sigma-delta ADC.
//
// Each enabled clock (one tick of the adaptive sampling clock) the delta adder takes the
// difference between the input and the 1-bit DAC's level, the sigma adder (integrator)
// accumulates it, and the comparator turns the integrator's sign into the output bit, which
// also drives the DAC. The density of ones in bit_o is (x_i + FS) / (2 FS), FS = 2**(ADC_W-1),
// so a boxcar average over 2**ADC_W bits recovers x_i to about one LSB.
//
// Interface: x_i is the input, two's complement, held by the source (the analogue input,
// represented here by its 14-bit value). en is the sampling-clock enable; the modulator runs
// on the system clock and only advances when en is high. bit_o changes one clock after an
// enabled clock.
//
// The loop structure (delta adder, sigma adder, comparator, 1-bit DAC) and the 14-bit word
// follow the source design. Its order (first), the digital model of the analogue loop, the
// DAC levels of +/-FS and the reset state are this design's own choices.
module sd_modulator
  import ecg_soc_pkg::*;
#(
  parameter int W = ADC_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] x_i,
  output logic                bit_o
);
  localparam int IW = W + 2;                       // integrator stays within +/- 2 FS
  localparam logic signed [IW-1:0] FS = IW'(1) <<< (W - 1);

  logic signed [IW-1:0] dac;                       // 1-bit DAC level
  logic signed [IW-1:0] delta;                     // delta adder
  logic signed [IW-1:0] sigma_q, sigma_d;          // sigma adder (integrator)

  always_comb begin
    dac     = bit_o ? FS : -FS;
    delta   = IW'(x_i) - dac;
    sigma_d = sigma_q + delta;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sigma_q <= '0;
      bit_o   <= 1'b0;
    end else if (en) begin
      sigma_q <= sigma_d;
      bit_o   <= !sigma_d[IW-1];                   // comparator: 1 when integrator >= 0
    end
  end
endmodule
