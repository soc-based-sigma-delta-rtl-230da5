// decimation_filter: digital low-pass filter and decimator of the sigma-delta ADC.
//
// A first-order sinc (accumulate-and-dump) filter: it counts the ones of the modulator's bit
// stream over a window of R = 2**R_LOG2 enabled clocks, then outputs the count rescaled to a
// W-bit two's-complement sample (count * 2**W / R - 2**(W-1), saturated to the W-bit range)
// and starts the next window. With R = 2**W the output resolution is the full W bits.
//
// Interface: bit_i and en come from the modulator and the sampling clock. valid_o pulses for
// one clock, on the clock after the R-th enabled clock of a window; sample_o holds the sample
// until the next one. Because the window is counted in enabled clocks, a change of sampling
// clock changes only how long a window lasts, never the scaling of its result.
//
// The source design gives only the function (a digital filter that turns the 1-bit stream into
// an N-bit word at 14 bits). The sinc1 structure and the window of 2**14 are this design's
// own choices.
module decimation_filter
  import ecg_soc_pkg::*;
#(
  parameter int W      = ADC_W,
  parameter int R_LOG2 = ADC_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                bit_i,
  output logic signed [W-1:0] sample_o,
  output logic                valid_o
);
  localparam int CW = R_LOG2 + 1;                  // count of ones, 0 .. R
  localparam int SW = (W > R_LOG2 ? W : R_LOG2) + 2;

  logic [R_LOG2-1:0] pos_q;                        // position in the window
  logic [CW-1:0]     ones_q;
  logic [CW-1:0]     ones_d;
  logic signed [SW-1:0] scaled;

  always_comb begin
    ones_d = ones_q + CW'(bit_i);
    if (W >= R_LOG2) scaled = SW'(ones_d) <<< (W - R_LOG2);
    else             scaled = SW'(ones_d) >>> (R_LOG2 - W);
    scaled = scaled - (SW'(1) <<< (W - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos_q    <= '0;
      ones_q   <= '0;
      sample_o <= '0;
      valid_o  <= 1'b0;
    end else begin
      valid_o <= 1'b0;
      if (en) begin
        pos_q <= pos_q + 1'b1;
        if (pos_q == '1) begin
          ones_q  <= '0;
          valid_o <= 1'b1;
          if (scaled > SW'((1 <<< (W - 1)) - 1)) sample_o <= {1'b0, {(W-1){1'b1}}};
          else                                   sample_o <= W'(scaled);
        end else begin
          ones_q <= ones_d;
        end
      end
    end
  end
endmodule
