// anfis_controller: adaptive neuro-fuzzy (ANFIS) choice of the ADC sampling clock.
//
// For every ADC sample p(n) it forms two features, the amplitude F = |p(n)| and the slope
// G = |p(n) - p(n-1)|, and runs a five-layer zero-order Sugeno network on them:
//   layer 1  five generalised-bell membership grades per input,
//            mu(x) = 1 / (1 + ((x - c) / a)**2), computed as a**2 / (a**2 + (x - c)**2);
//   layer 2  25 rule firing strengths w = muF * muG (product T-norm);
//   layer 3  normalisation by the sum of all firing strengths;
//   layer 4  each rule's consequent (LCLK = 0, MCLK = 1, HCLK = 2) weighted by its strength;
//   layer 5  the sum, y = sum(w * f) / sum(w).
// Layers 3 to 5 are evaluated as the single quotient of layer 5. The clock whose consequent
// is nearest to y is selected (thresholds 0.5 and 1.5).
//
// Hardware: one subtract/square path and one sequential divider shared by the ten membership
// grades, one multiplier for the rules (one rule per clock) and the same divider for the
// output. Grades are kept in Q0.24 and firing strengths unrounded (Q0.48), so that the
// far tails of the bell functions still weigh correctly. A decision takes
// 11 * (DIV_W + 2) + 31 clocks (757 with the 64-bit divider), far less than the thousands
// of clocks between ADC samples.
//
// Interface: sample_valid / sample_i deliver p(n). done pulses one clock when sel_o, y_o,
// f_o and g_o hold the new result; sel_o keeps its value until then (HCLK after reset).
// Samples that arrive while busy is high are dropped (the slope then spans the gap).
// A feature larger than its very-high centre is fuzzified as that centre.
// If every firing strength rounds to zero the controller picks HCLK.
//
// From the source design: the two features, the five layers, the bell function, the product
// rule and the 5 x 5 rule table. The membership centres and widths, the fixed-point formats
// and the sequential schedule are this design's own choices (see ecg_soc_pkg).
module anfis_controller
  import ecg_soc_pkg::*;
#(
  parameter int W = ADC_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                sample_valid,
  input  logic signed [W-1:0] sample_i,
  output logic                busy,
  output logic                done,
  output clk_sel_e            sel_o,
  output logic [Y_Q+1:0]      y_o,      // defuzzified output, Q.8, 0 .. 2.0
  output logic [W-1:0]        f_o,      // feature F
  output logic [W-1:0]        g_o       // feature G
);
  localparam int DIV_W  = 64;
  localparam int MUW    = MU_Q + 1;                       // grade 0 .. 2**MU_Q
  localparam int WW     = 2 * MUW;                        // firing strength, Q.48, kept whole
  localparam int SUMW   = WW + $clog2(NUM_RULE) + 1;      // sum of 25 strengths, times 2

  typedef enum logic [2:0] {S_IDLE, S_MF_START, S_MF_WAIT, S_RULE, S_OUT_START, S_OUT_WAIT, S_DONE}
    state_e;

  state_e            state_q;
  logic signed [W-1:0] prev_q;
  logic [W-1:0]      f_q, g_q;
  logic [3:0]        k_q;                                 // membership function 0..9
  logic [MUW-1:0]    mu_q [2*NUM_MF];
  logic [2:0]        fi_q, gi_q;                          // rule being fired
  logic [SUMW-1:0]   sum_w_q, sum_wf_q;

  // ---- shared divider ----
  logic             div_start, div_busy, div_done;
  logic [DIV_W-1:0] div_dividend, div_divisor, div_quot;

  udiv_seq #(.W(DIV_W)) u_div (
    .clk, .rst_n, .start(div_start), .dividend(div_dividend), .divisor(div_divisor),
    .busy(div_busy), .done(div_done), .quotient(div_quot)
  );

  // ---- layer 1 operands for membership function k ----
  logic [W-1:0]       mf_x;
  int unsigned        mf_c, mf_a;
  logic [W:0]         mf_d;                               // |x - c|
  logic [DIV_W-1:0]   mf_a2;

  always_comb begin
    if (k_q < 4'(NUM_MF)) begin
      mf_x = f_q;
      mf_c = F_CENTRE[k_q[2:0]];
      mf_a = F_WIDTH;
    end else begin
      mf_x = g_q;
      mf_c = G_CENTRE[3'(k_q - 4'(NUM_MF))];
      mf_a = G_WIDTH;
    end
    // a feature beyond its very-high centre counts as exactly very high
    if (k_q < 4'(NUM_MF)) begin
      if ((W+1)'(mf_x) > (W+1)'(F_CENTRE[NUM_MF-1])) mf_x = W'(F_CENTRE[NUM_MF-1]);
    end else begin
      if ((W+1)'(mf_x) > (W+1)'(G_CENTRE[NUM_MF-1])) mf_x = W'(G_CENTRE[NUM_MF-1]);
    end
    if ((W+1)'(mf_x) >= (W+1)'(mf_c)) mf_d = (W+1)'(mf_x) - (W+1)'(mf_c);
    else                              mf_d = (W+1)'(mf_c) - (W+1)'(mf_x);
    mf_a2 = DIV_W'(mf_a) * DIV_W'(mf_a);
  end

  // ---- layer 2: firing strength of rule (fi, gi) ----
  logic [WW-1:0] w_rule;
  always_comb w_rule = WW'(mu_q[4'(fi_q)]) * WW'(mu_q[3'(NUM_MF) + 4'(gi_q)]);

  // ---- features of the incoming sample ----
  logic signed [W:0] diff;
  logic [W-1:0]      abs_p, abs_diff;
  always_comb begin
    diff     = (W+1)'(sample_i) - (W+1)'(prev_q);
    abs_p    = sample_i[W-1] ? W'(-sample_i) : W'(sample_i);
    abs_diff = diff[W] ? W'(-diff) : W'(diff);
  end

  always_comb begin
    div_start    = (state_q == S_MF_START) || (state_q == S_OUT_START && sum_w_q != '0);
    if (state_q == S_OUT_START) begin
      div_dividend = DIV_W'(sum_wf_q) << Y_Q;
      div_divisor  = DIV_W'(sum_w_q);
    end else begin
      div_dividend = mf_a2 << MU_Q;
      div_divisor  = mf_a2 + DIV_W'(mf_d) * DIV_W'(mf_d);
    end
  end

  assign busy = (state_q != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      prev_q   <= '0;
      f_q      <= '0;
      g_q      <= '0;
      k_q      <= '0;
      fi_q     <= '0;
      gi_q     <= '0;
      sum_w_q  <= '0;
      sum_wf_q <= '0;
      for (int i = 0; i < 2*NUM_MF; i++) mu_q[i] <= '0;
      done     <= 1'b0;
      sel_o    <= SEL_HCLK;
      y_o      <= '0;
      f_o      <= '0;
      g_o      <= '0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (sample_valid) begin
          f_q    <= abs_p;                               // F(n) = |p(n)|
          g_q    <= abs_diff;                            // G(n) = |p(n) - p(n-1)|
          prev_q <= sample_i;
          k_q    <= '0;
          state_q <= S_MF_START;
        end
        S_MF_START: state_q <= S_MF_WAIT;
        S_MF_WAIT: if (div_done) begin
          mu_q[k_q] <= (div_quot > DIV_W'(1 << MU_Q)) ? MUW'(1 << MU_Q) : MUW'(div_quot);
          if (k_q == 4'(2*NUM_MF - 1)) begin
            fi_q     <= '0;
            gi_q     <= '0;
            sum_w_q  <= '0;
            sum_wf_q <= '0;
            state_q  <= S_RULE;
          end else begin
            k_q     <= k_q + 1'b1;
            state_q <= S_MF_START;
          end
        end
        S_RULE: begin
          sum_w_q  <= sum_w_q + SUMW'(w_rule);
          sum_wf_q <= sum_wf_q + SUMW'(w_rule) * SUMW'(consequent(RULES[fi_q][gi_q]));
          if (gi_q == 3'(NUM_MF - 1)) begin
            gi_q <= '0;
            if (fi_q == 3'(NUM_MF - 1)) state_q <= S_OUT_START;
            else                        fi_q <= fi_q + 1'b1;
          end else begin
            gi_q <= gi_q + 1'b1;
          end
        end
        S_OUT_START: begin
          if (sum_w_q == '0) begin                       // no rule fires: safest clock
            y_o     <= (Y_Q+2)'(2 << Y_Q);
            sel_o   <= SEL_HCLK;
            state_q <= S_DONE;
          end else begin
            state_q <= S_OUT_WAIT;
          end
        end
        S_OUT_WAIT: if (div_done) begin
          y_o <= (Y_Q+2)'(div_quot);
          if (div_quot < DIV_W'(Y_THR_LM))      sel_o <= SEL_LCLK;
          else if (div_quot < DIV_W'(Y_THR_MH)) sel_o <= SEL_MCLK;
          else                                  sel_o <= SEL_HCLK;
          state_q <= S_DONE;
        end
        S_DONE: begin
          done    <= 1'b1;
          f_o     <= f_q;
          g_o     <= g_q;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // the decision is always one of the three clocks, and done ends a decision
  assert property (@(posedge clk) disable iff (!rst_n) sel_o != SEL_SPARE)
    else $error("anfis_controller: spare select produced");
  assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy)
    else $error("anfis_controller: done while busy");
endmodule
