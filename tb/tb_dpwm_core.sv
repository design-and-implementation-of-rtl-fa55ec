// tb_dpwm_core: the two-counter modulator at its default 5 + 4 bit split.
// The testbench makes its own period timing (fs in the last of 512 clocks,
// seg_tick in the last of every 16) and sweeps every duty command 0..511,
// then random ones. In each period it checks, clock by clock, that pwm is
// high exactly in clocks 0 .. D-1 and flip-flop No.1 in clocks 0 .. 16*M-1,
// where D is the command sampled at the period boundary and M its 5 upper
// bits, so that each command takes effect one period after it is applied.
module tb_dpwm_core;
  localparam int unsigned SEG_CLKS = 16;
  localparam int unsigned PERIOD   = 512;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset acts
  logic fs, seg_tick;
  logic [8:0] duty;
  logic pwm, q1, tcd1, tcd2, pwm_fall;
  int unsigned p, d_cur, high_clks, falls;
  int checks = 0, failures = 0;

  dpwm_core dut (.*);

  always #5 clk = ~clk;

  assign fs       = (p == PERIOD - 1);
  assign seg_tick = (p % SEG_CLKS == SEG_CLKS - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) p <= PERIOD - 1;
    else        p <= (p + 1) % PERIOD;
  end

  initial begin
    repeat (800 * PERIOD) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one period with command d applied now; checks the period after the next fs
  task automatic run_period(input int unsigned d);
    duty = 9'(d);
    // wait for the boundary at which d is sampled
    while (!fs) @(negedge clk);
    d_cur = d;
    high_clks = 0;
    falls = 0;
    @(negedge clk);
    // p is now 0
    for (int i = 0; i < PERIOD; i++) begin
      checks += 3;
      if (pwm !== (p < d_cur)) begin
        failures++;
        if (failures < 10) $display("D=%0d p=%0d pwm=%0b", d_cur, p, pwm);
      end
      if (q1 !== (p < (d_cur / SEG_CLKS) * SEG_CLKS)) failures++;
      if (pwm_fall !== (d_cur != 0 && p == d_cur - 1)) failures++;
      if (pwm) high_clks++;
      if (pwm_fall) falls++;
      if (i < PERIOD - 1) @(negedge clk);
    end
    // pulse width in clocks and one falling edge per nonzero pulse
    checks += 2;
    if (high_clks != d_cur) failures++;
    if (falls != (d_cur != 0 ? 1 : 0)) failures++;
  endtask

  initial begin
    duty = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int d = 0; d < PERIOD; d++) run_period(d);
    for (int k = 0; k < 100; k++) run_period($urandom_range(0, PERIOD - 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
