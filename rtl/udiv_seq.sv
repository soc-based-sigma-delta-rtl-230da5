// udiv_seq: unsigned restoring divider, one quotient bit per clock.
//
// A pulse on start loads dividend and divisor; W clocks later done pulses for one clock
// with quotient valid (and held until the next start). busy is high in between; a start
// while busy is ignored. The divisor must not be zero (its callers guarantee it). This is the shared "dividing block" of the fuzzy
// controller and the interpolator; its structure is this design's own choice.
module udiv_seq #(
  parameter int W = 40
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quotient
);
  localparam int CW = $clog2(W + 1);

  logic [W-1:0]  rem_q;     // partial remainder
  logic [W-1:0]  dvd_q;     // dividend bits still to shift in, MSB first
  logic [W-1:0]  dvs_q;
  logic [CW-1:0] cnt_q;
  logic [W:0]    trial;

  always_comb trial = {rem_q, dvd_q[W-1]} - {1'b0, dvs_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem_q    <= '0;
      dvd_q    <= '0;
      dvs_q    <= '0;
      cnt_q    <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
      quotient <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        rem_q    <= '0;
        dvd_q    <= dividend;
        dvs_q    <= divisor;
        cnt_q    <= CW'(W);
        busy     <= 1'b1;
        quotient <= '0;
      end else if (busy) begin
        dvd_q <= dvd_q << 1;
        if (!trial[W]) begin
          rem_q    <= trial[W-1:0];
          quotient <= {quotient[W-2:0], 1'b1};
        end else begin
          rem_q    <= {rem_q[W-2:0], dvd_q[W-1]};
          quotient <= {quotient[W-2:0], 1'b0};
        end
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // done marks the end of a division and comes only once the divider is free again
  assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy)
    else $error("udiv_seq: done while busy");
endmodule
