// tb_sd_adc: the full 14-bit sigma-delta ADC (decimation window 2**14) on constant inputs.
//
// For each input value the ADC runs two windows; the second one, taken entirely on the new
// value, must match it within 2 LSB. Sample spacing is checked too: 2**14 clocks with the
// enable always on, 2**15 clocks with the enable on every other clock.
module tb_sd_adc;
  import ecg_soc_pkg::*;

  localparam int R = 1 << ADC_W;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1, bit_o, valid_o;
  logic signed [ADC_W-1:0] x, sample_o;
  int checks = 0, failures = 0;
  longint cyc = 0, last_valid = -1;
  int spacing_expected = R;

  sd_adc dut (.clk, .rst_n, .en, .x_i(x), .bit_o, .sample_o, .valid_o);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && valid_o) begin
    if (last_valid >= 0) begin
      checks++;
      if (cyc - last_valid != longint'(spacing_expected)) begin
        failures++;
        $display("sample spacing %0d, expected %0d", cyc - last_valid, spacing_expected);
      end
    end
    last_valid = cyc;
  end

  task automatic convert(input int xv);
    x = ADC_W'(xv);
    @(posedge clk iff valid_o);     // window that saw the change
    @(posedge clk iff valid_o);     // clean window
    checks++;
    if (int'(sample_o) - xv > 2 || xv - int'(sample_o) > 2) begin
      failures++;
      $display("x=%0d sample=%0d", xv, sample_o);
    end
  endtask

  initial begin
    x = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    convert(0);
    convert(3000);
    convert(-5000);
    convert(8100);
    convert(-8150);
    convert(int'($urandom_range(0, 16000)) - 8000);
    // half-rate sampling clock
    @(posedge clk iff valid_o);
    #1;
    spacing_expected = 2 * R;
    last_valid = -1;
    fork
      forever begin en = ~en; @(posedge clk); #1; end
    join_none
    convert(1234);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
