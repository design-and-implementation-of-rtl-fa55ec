// tb_freq_divider: at the default sizes, seg_tick must come every 16 clocks
// and fs every 512 clocks, fs always together with a seg_tick, and the
// segment count must step down from 31 to 0 once per segment.
module tb_freq_divider;
  localparam int unsigned SEG_CLKS = 2 ** dpwm_pkg::LSB_BITS;
  localparam int unsigned PERIOD   = dpwm_pkg::SEGMENTS * SEG_CLKS;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset acts
  logic seg_tick, fs;
  logic [dpwm_pkg::DIV_W-1:0] seg_count;
  int unsigned p;          // position in the period, reset to its last clock
  int checks = 0, failures = 0;
  int periods = 0;

  freq_divider dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20 * PERIOD) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    p = PERIOD - 1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 5 * PERIOD; i++) begin
      checks += 3;
      if (fs !== (p == PERIOD - 1)) failures++;
      if (seg_tick !== (p % SEG_CLKS == SEG_CLKS - 1)) failures++;
      if (seg_count !== dpwm_pkg::DIV_W'(dpwm_pkg::SEGMENTS - 1 - p / SEG_CLKS)) failures++;
      if (fs) periods++;
      @(negedge clk);
      p = (p + 1) % PERIOD;
    end
    checks++;
    if (periods != 5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
