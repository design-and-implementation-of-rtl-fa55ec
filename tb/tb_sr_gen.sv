// tb_sr_gen: synchronous rectifier signal at the default sizes.
// The testbench makes its own 512-clock period timing and, for random duty
// commands and deadtimes plus the corner cases (zero deadtimes, commands so
// large that no SR pulse fits, zero duty), checks every clock that sr is high
// exactly from clock D + td_off to clock 511 - td_on of the period, and
// that no pulse is produced when that range is empty.
module tb_sr_gen;
  localparam int unsigned SEG_CLKS = 16;
  localparam int unsigned PERIOD   = 512;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset acts
  logic fs, seg_tick;
  logic [8:0] duty;
  logic [5:0] td_on, td_off;
  logic sr, sr_active;
  int unsigned p, rise, fall;
  bit en;
  int checks = 0, failures = 0;
  int dropped = 0, ton_zero = 0, toff_zero = 0, normal = 0;

  sr_gen dut (.*);

  always #5 clk = ~clk;

  assign fs       = (p == PERIOD - 1);
  assign seg_tick = (p % SEG_CLKS == SEG_CLKS - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) p <= PERIOD - 1;
    else        p <= (p + 1) % PERIOD;
  end

  initial begin
    repeat (400 * PERIOD) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_period(input int unsigned d, input int unsigned ton,
                            input int unsigned toff);
    duty = 9'(d); td_on = 6'(ton); td_off = 6'(toff);
    while (!fs) @(negedge clk);
    rise = d + toff;
    fall = PERIOD - ton;
    en   = rise < fall;
    if (!en) dropped++;
    else if (ton == 0) ton_zero++;
    else if (toff == 0) toff_zero++;
    else normal++;
    @(negedge clk);
    for (int i = 0; i < PERIOD; i++) begin
      checks++;
      if (sr !== (en && p >= rise && p < fall)) begin
        failures++;
        if (failures < 10)
          $display("D=%0d on=%0d off=%0d p=%0d sr=%0b", d, ton, toff, p, sr);
      end
      checks++;
      if (sr_active !== en) failures++;
      if (i < PERIOD - 1) @(negedge clk);
    end
  endtask

  initial begin
    duty = '0; td_on = '0; td_off = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    run_period(100, 5, 7);
    run_period(0, 4, 4);
    run_period(200, 0, 3);
    run_period(300, 6, 0);
    run_period(0, 0, 0);
    run_period(511, 1, 1);
    run_period(480, 20, 20);
    run_period(460, 20, 31);
    run_period(461, 20, 31);
    for (int k = 0; k < 200; k++)
      run_period($urandom_range(0, 511), $urandom_range(0, 63), $urandom_range(0, 63));
    checks++;
    if (dropped == 0 || ton_zero == 0 || toff_zero == 0 || normal == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
