// tb_interp_filter: the interpolator with a 256-clock output grid.
//
// Input samples arrive at the three spacings the clocks give for a 256-tick decimation
// window: 256 (HCLK), 359 (MCLK) and 461 (LCLK) clocks. Three stimuli:
//   - a constant input: the output must equal it exactly (times 4, two fraction bits);
//   - a ramp of 1/4 LSB per clock: linear interpolation reproduces it, so consecutive
//     outputs must differ by 64 LSB (256 in output units) within 4, at every spacing;
//   - a step: outputs must move monotonically from the old value to the new one.
// out_valid must pulse every 256 clocks exactly.
module tb_interp_filter;
  import ecg_soc_pkg::*;

  localparam int OL = 8;
  localparam int G  = 1 << OL;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_valid;
  logic signed [ADC_W-1:0] in_sample;
  logic signed [OUT_W-1:0] out_sample;
  int checks = 0, failures = 0;
  longint cyc = 0, last_out = -1;

  interp_filter #(.OUT_LOG2(OL)) dut (.clk, .rst_n, .in_valid, .in_sample, .out_valid, .out_sample);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    if (last_out >= 0) begin
      checks++;
      if (cyc - last_out != G) begin failures++; $display("output spacing %0d", cyc - last_out); end
    end
    last_out = cyc;
  end

  // Send one input sample after a gap of t clocks.
  task automatic send(input int v, input int t);
    repeat (t - 1) @(posedge clk);
    #1;
    in_sample = ADC_W'(v);
    in_valid = 1'b1;
    @(posedge clk); #1;
    in_valid = 1'b0;
  endtask

  // Collect the next n outputs.
  task automatic collect(input int n, ref int outs[$]);
    outs.delete();
    repeat (n) begin
      @(posedge clk iff out_valid);
      outs.push_back(int'(out_sample));
    end
  endtask

  int outs[$];
  int spacings [3] = '{256, 359, 461};

  initial begin
    in_sample = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // constant
    for (int i = 0; i < 4; i++) send(-1234, 300);
    collect(2, outs);
    foreach (outs[i]) begin
      checks++;
      if (outs[i] != -1234 * 4) begin failures++; $display("constant: out %0d", outs[i]); end
    end

    // ramp of 1/4 LSB per clock at each spacing
    foreach (spacings[s]) begin
      int v = -4000, T = spacings[s];
      fork
        begin
          for (int k = 0; k < 30; k++) begin
            v += T / 4;
            send(v, T);
          end
        end
        begin
          repeat (8 * T / G + 2) @(posedge clk iff out_valid);   // settle
          collect(12, outs);
        end
      join
      for (int i = 1; i < outs.size(); i++) begin
        checks++;
        if (outs[i] - outs[i-1] > 256 + 4 || outs[i] - outs[i-1] < 256 - 4) begin
          failures++;
          $display("ramp T=%0d: outputs %0d -> %0d", T, outs[i-1], outs[i]);
        end
      end
      // return to a constant before the next spacing
      for (int i = 0; i < 3; i++) send(-4000, T);
      repeat (3) @(posedge clk iff out_valid);
    end

    // step up: monotonic between old and new value
    send(-4000, 300);
    send(6000, 461);
    send(6000, 461);
    collect(6, outs);
    for (int i = 0; i < outs.size(); i++) begin
      checks++;
      if (outs[i] < -4000 * 4 || outs[i] > 6000 * 4 || (i > 0 && outs[i] < outs[i-1])) begin
        failures++;
        $display("step: output %0d = %0d", i, outs[i]);
      end
    end
    checks++;
    if (outs[outs.size()-1] != 6000 * 4) begin failures++; $display("step end %0d", outs[outs.size()-1]); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
