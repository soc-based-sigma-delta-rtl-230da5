// interp_filter: up-sampling and interpolation of the variable-rate ADC output.
//
// The ADC delivers samples at a rate that follows the selected sampling clock. This block
// rebuilds a signal at the highest sampling rate (one output every 2**OUT_LOG2 system clocks,
// which is the ADC's sample spacing on HCLK) by linear interpolation: when sample x(n) arrives
// it measures the interval T since x(n-1) in system clocks, divides (x(n) - x(n-1)) by T with
// 16 fraction bits, and ramps an accumulator from x(n-1) towards x(n) by that step every clock,
// stopping at x(n). Output samples are read from the accumulator on a fixed grid and carry
// OUT_W - W = 2 fraction bits, so the output word is 16 bits against the ADC's 14.
//
// Timing: the ramp for x(n) starts W + 19 clocks (one division) after x(n) arrives, so the
// output trails the input by about one input interval; while a division runs, the previous
// ramp goes on towards its own end point. out_valid pulses one clock every
// 2**OUT_LOG2 clocks from reset; out_sample holds between pulses. Input samples closer than
// one division apart are not expected (the ADC spaces them by thousands of clocks); one that
// arrives while a division runs is dropped.
//
// From the source design: interpolation to the highest sampling rate after the clock
// multiplexer, and the 16-bit output resolution. Linear interpolation and taking the rate
// from the measured sample spacing (which follows the controller's clock choice) are this
// design's own choices.
module interp_filter
  import ecg_soc_pkg::*;
#(
  parameter int W        = ADC_W,
  parameter int OW       = OUT_W,
  parameter int OUT_LOG2 = ADC_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  in_sample,
  output logic                 out_valid,
  output logic signed [OW-1:0] out_sample
);
  localparam int FRAC  = 16;                       // accumulator fraction bits
  localparam int AW    = W + FRAC + 1;             // accumulator, signed
  localparam int TW    = OUT_LOG2 + 3;             // interval counter, up to 8x the grid
  localparam int DIV_W = W + 1 + FRAC;

  logic [TW-1:0]       gap_q;                      // clocks since the last input sample
  logic signed [W-1:0] x_prev_q, x_cur_q;
  logic                neg_q;                      // ramp direction: down
  logic signed [AW-1:0] acc_q, step_q, acc_next, target;
  logic signed [AW-1:0] tgt_q;                     // end point of the running ramp
  logic                dir_q;                      // direction of the running ramp: down
  logic                ramp_q;
  logic [OUT_LOG2-1:0] grid_q;

  logic             div_start, div_busy, div_done;
  logic [DIV_W-1:0] div_dividend, div_divisor, div_quot;
  logic signed [W:0] delta;
  logic [W:0]        delta_mag;

  always_comb begin
    delta        = (W+1)'(in_sample) - (W+1)'(x_cur_q);
    div_start    = in_valid && !div_busy;
    delta_mag    = delta[W] ? (W+1)'(-delta) : (W+1)'(delta);
    div_dividend = DIV_W'(delta_mag) << FRAC;
    div_divisor  = DIV_W'(gap_q) + DIV_W'(1);
  end

  udiv_seq #(.W(DIV_W)) u_div (
    .clk, .rst_n, .start(div_start), .dividend(div_dividend), .divisor(div_divisor),
    .busy(div_busy), .done(div_done), .quotient(div_quot)
  );

  always_comb begin
    target   = AW'(x_cur_q) <<< FRAC;
    acc_next = acc_q + step_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gap_q    <= '0;
      x_prev_q <= '0;
      x_cur_q  <= '0;
      neg_q    <= 1'b0;
      acc_q    <= '0;
      step_q   <= '0;
      tgt_q    <= '0;
      dir_q    <= 1'b0;
      ramp_q   <= 1'b0;
    end else begin
      if (div_start) begin
        gap_q    <= '0;
        x_prev_q <= x_cur_q;
        x_cur_q  <= in_sample;
        neg_q    <= delta[W];
      end else if (gap_q != '1) begin
        gap_q <= gap_q + 1'b1;
      end

      if (div_done) begin
        acc_q  <= AW'(x_prev_q) <<< FRAC;
        step_q <= neg_q ? -AW'(div_quot) : AW'(div_quot);
        tgt_q  <= target;
        dir_q  <= neg_q;
        ramp_q <= 1'b1;
      end else if (ramp_q) begin
        if (dir_q ? (acc_next <= tgt_q) : (acc_next >= tgt_q)) begin
          acc_q  <= tgt_q;
          ramp_q <= 1'b0;
        end else begin
          acc_q <= acc_next;
        end
      end
    end
  end

  // Output grid at the highest sampling rate.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      grid_q     <= '0;
      out_valid  <= 1'b0;
      out_sample <= '0;
    end else begin
      grid_q    <= grid_q + 1'b1;
      out_valid <= (grid_q == '1);
      if (grid_q == '1) out_sample <= OW'(acc_q >>> (FRAC - (OW - W)));
    end
  end

  // the ramp never passes its target
  assert property (@(posedge clk) disable iff (!rst_n)
                   ramp_q |-> (dir_q ? (acc_q >= tgt_q) : (acc_q <= tgt_q)))
    else $error("interp_filter: ramp overshoot");
endmodule
