// ecg_soc_pkg: types and constants shared by the adaptive-clock ECG front end.
//
// The system samples an ECG signal with a sigma-delta ADC whose sampling clock is chosen,
// sample by sample, by a small neuro-fuzzy (ANFIS) controller from three clocks: HCLK, MCLK
// and LCLK. This package holds the sample widths (14-bit ADC samples, 16-bit refined output),
// the encoding of the clock choice, the 5 x 5 fuzzy rule table and the membership-function
// constants of the controller.
//
// From the source design: the 14-bit ADC word, the 16-bit output resolution, the three clock
// frequencies (400, 285 and 222 MHz) and the rule table with its five linguistic terms
// (very low, low, medium, high, very high). The select encoding, the membership-function centres
// and widths, the consequent values and the fixed-point formats are this design's own choices.
package ecg_soc_pkg;

  // Sample widths.
  localparam int ADC_W = 14;             // sigma-delta ADC output word
  localparam int OUT_W = 16;             // interpolated output: 14 integer + 2 fraction bits
  localparam int OUT_FRAC = OUT_W - ADC_W;

  // Sampling clocks, as the select code of the 4-to-1 clock multiplexer.
  // Code 3 is the multiplexer's fourth input, which carries HCLK again.
  typedef enum logic [1:0] {
    SEL_LCLK  = 2'd0,
    SEL_MCLK  = 2'd1,
    SEL_HCLK  = 2'd2,
    SEL_SPARE = 2'd3
  } clk_sel_e;

  // Clock frequencies in MHz. MCLK is derived from HCLK and LCLK from MCLK by rational
  // rate reduction, so the down-sampling ratios are MCLK/HCLK and LCLK/MCLK.
  localparam int unsigned HCLK_MHZ = 400;
  localparam int unsigned MCLK_MHZ = 285;
  localparam int unsigned LCLK_MHZ = 222;

  // Fuzzy controller.
  localparam int NUM_MF  = 5;            // linguistic terms per input
  localparam int NUM_RULE = NUM_MF * NUM_MF;
  localparam int MU_Q    = 24;           // membership grades are unsigned Q0.24 (1.0 = 2**24)
  localparam int Y_Q     = 8;            // defuzzified output is Q.8

  // Generalised-bell membership functions mu(x) = 1 / (1 + ((x - c) / a)**2).
  // F (amplitude |p|) spans 0 .. 2**13. G (slope |p(n) - p(n-1)|) uses a finer scale,
  // 0 .. 16 LSB per sample, set so that the baseline of an ECG sampled at 360 samples/s
  // reads as a low slope and the QRS complex as a very high one.
  // Neighbouring functions cross at mu = 0.5 (spacing 2a).
  typedef int unsigned mf_centre_t [NUM_MF];
  localparam mf_centre_t F_CENTRE = '{0, 2048, 4096, 6144, 8192};
  localparam int unsigned F_WIDTH = 1024;
  localparam mf_centre_t G_CENTRE = '{0, 4, 8, 12, 16};
  localparam int unsigned G_WIDTH = 2;

  // Rule table, indexed [f term][g term]: 0 very low .. 4 very high.
  typedef clk_sel_e rule_table_t [NUM_MF][NUM_MF];
  localparam rule_table_t RULES = '{
    '{SEL_HCLK, SEL_LCLK, SEL_LCLK, SEL_LCLK, SEL_HCLK},   // f very low
    '{SEL_HCLK, SEL_LCLK, SEL_LCLK, SEL_LCLK, SEL_HCLK},   // f low
    '{SEL_HCLK, SEL_MCLK, SEL_MCLK, SEL_MCLK, SEL_HCLK},   // f medium
    '{SEL_HCLK, SEL_HCLK, SEL_HCLK, SEL_HCLK, SEL_HCLK},   // f high
    '{SEL_HCLK, SEL_HCLK, SEL_HCLK, SEL_HCLK, SEL_HCLK}    // f very high
  };

  // Zero-order Sugeno consequent of each output term: LCLK = 0, MCLK = 1, HCLK = 2.
  function automatic logic [1:0] consequent(clk_sel_e s);
    case (s)
      SEL_LCLK: return 2'd0;
      SEL_MCLK: return 2'd1;
      default:  return 2'd2;
    endcase
  endfunction

  // Defuzzified value to clock: nearest consequent, thresholds 0.5 and 1.5 in Q.8.
  localparam int unsigned Y_THR_LM = 128;
  localparam int unsigned Y_THR_MH = 384;

endpackage
