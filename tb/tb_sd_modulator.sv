// tb_sd_modulator: checks the density of ones of the sigma-delta modulator.
//
// For a set of constant inputs x, with the sampling enable toggling at random, it counts the
// ones over 4096 enabled clocks and compares the count with the ideal 4096 * (x + FS) / (2 FS),
// allowing 3 counts for the integrator's residue. It also checks that the output bit never
// changes on a clock without enable.
module tb_sd_modulator;
  import ecg_soc_pkg::*;

  localparam int N  = 4096;
  localparam int FS = 1 << (ADC_W - 1);

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, bit_o;
  logic signed [ADC_W-1:0] x;
  int checks = 0, failures = 0;

  sd_modulator dut (.clk, .rst_n, .en, .x_i(x), .bit_o);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bit_o may only change one clock after an enabled clock
  logic en_d, bit_d;
  always_ff @(posedge clk) begin
    en_d  <= en;
    bit_d <= bit_o;
    if (rst_n && !en_d && bit_o != bit_d) begin
      failures++;
      $display("bit changed without enable");
    end
  end

  task automatic measure(input int xv);
    int ones = 0, ticks = 0;
    real ideal;
    x = ADC_W'(xv);
    // settle for a few enabled clocks
    while (ticks < 64) begin
      en = ($urandom_range(0, 2) != 0);
      @(posedge clk); #1;
      if (en) ticks++;
    end
    ticks = 0;
    while (ticks < N) begin
      en = ($urandom_range(0, 2) != 0);
      if (en) begin
        ones += int'(bit_o);
        ticks++;
      end
      @(posedge clk); #1;
    end
    en = 1'b0;
    ideal = real'(N) * real'(xv + FS) / real'(2 * FS);
    checks++;
    if ((real'(ones) - ideal) > 3.0 || (ideal - real'(ones)) > 3.0) begin
      failures++;
      $display("x=%0d ones=%0d ideal=%f", xv, ones, ideal);
    end
  endtask

  initial begin
    x = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    measure(0);
    measure(1000);
    measure(-1000);
    measure(8000);
    measure(-8000);
    measure(-8192);
    measure(8191);
    for (int i = 0; i < 8; i++) measure(int'($urandom_range(0, 16383)) - 8192);
    checks++;   // the no-change-without-enable monitor ran throughout
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
