// tb_dpwm_top: end-to-end test of the complete DPWM at its default sizes
// (9-bit command, 512-clock period, 6-bit deadtimes).
//
// A reference model, independent of the design, follows the period position
// and, for the command and deadtimes in force at each period boundary,
// checks every clock that fs marks the last clock of the 512-clock period,
// that pwm is high exactly in clocks 0 .. D-1, and that sr is high exactly in
// clocks D+td_off .. 511-td_on (none if that is empty). Deadtimes are written
// through the serial port. The stimulus follows the evaluation of the
// reference design: a slow triangle duty sweep from 0 to 100 % and back,
// which moves the pulse through all 32 segments, and large steps of the
// command (24 % -> 60 % -> 12 %) that must take effect in the very next
// period. Each mechanism of the design is counted and must occur.
module tb_dpwm_top;
  localparam int unsigned PERIOD = 512;
  localparam int unsigned DT_W   = 6;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset acts
  logic [8:0] duty;
  logic sclk, sdi, cs_n;
  logic pwm, sr, fs;
  logic [DT_W-1:0] td_on, td_off;

  dpwm_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned p = 0;
  bit running = 1'b0, have_cur = 1'b0, have_next = 1'b0;
  int unsigned ton_ref = 4, toff_ref = 4;      // reset values of the registers
  int unsigned cur_d, cur_rise, cur_fall, nxt_d, nxt_ton, nxt_toff, prev_d;
  bit cur_en;
  int unsigned high_clks, periods = 0;
  // mechanism counters
  int n_seg_change = 0, n_coarse_only = 0, n_fine_only = 0, n_zero = 0,
      n_full = 0, n_sr_dropped = 0, n_ton_zero = 0, n_toff_zero = 0,
      n_sr_at_start = 0, n_step = 0, n_dt_write = 0, n_dt_ignored = 0;

  initial begin
    repeat (700 * PERIOD) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference period position: the design resets into the last clock of a period
  always @(posedge clk) if (running) p <= (p + 1) % PERIOD;

  // reference checker, sampled at the falling clock edge
  always @(negedge clk) if (running) begin
    if (p == 0 && have_next) begin
      if (have_cur && (cur_d / 16 != nxt_d / 16)) n_seg_change++;
      if (have_cur && (cur_d > nxt_d + 100 || nxt_d > cur_d + 100)) n_step++;
      cur_d    = nxt_d;
      cur_rise = nxt_d + nxt_toff;
      cur_fall = PERIOD - nxt_ton;
      cur_en   = cur_rise < cur_fall;
      have_cur = 1'b1;
      high_clks = 0;
      if (cur_d == 0) n_zero++;
      if (cur_d == PERIOD - 1) n_full++;
      if (cur_d % 16 == 0 && cur_d != 0) n_coarse_only++;
      if (cur_d < 16 && cur_d != 0) n_fine_only++;
      if (!cur_en) n_sr_dropped++;
      if (cur_en && nxt_ton == 0) n_ton_zero++;
      if (cur_en && nxt_toff == 0) n_toff_zero++;
      if (cur_en && cur_rise == 0) n_sr_at_start++;
    end
    checks++;
    if (fs !== (p == PERIOD - 1)) begin
      failures++;
      if (failures < 10) $display("fs wrong at p=%0d", p);
    end
    if (have_cur) begin
      checks += 2;
      if (pwm !== (p < cur_d)) begin
        failures++;
        if (failures < 10) $display("pwm: D=%0d p=%0d pwm=%0b", cur_d, p, pwm);
      end
      if (sr !== (cur_en && p >= cur_rise && p < cur_fall)) begin
        failures++;
        if (failures < 10)
          $display("sr: D=%0d rise=%0d fall=%0d p=%0d sr=%0b", cur_d, cur_rise, cur_fall, p, sr);
      end
      if (pwm) high_clks++;
      if (p == PERIOD - 1) begin
        // duty cycle of the finished period, counted in clocks
        checks++;
        if (high_clks != cur_d) failures++;
        periods++;
      end
    end
    if (fs) begin
      nxt_d = duty; nxt_ton = ton_ref; nxt_toff = toff_ref;
      have_next = 1'b1;
      checks += 2;
      if (td_on !== DT_W'(ton_ref)) failures++;
      if (td_off !== DT_W'(toff_ref)) failures++;
    end
  end

  // wait until just after the start of a period
  task automatic to_period_start();
    do @(posedge clk); while (p != 0);
    #1;
  endtask

  // command d for n periods
  task automatic hold(input int unsigned d, input int unsigned n);
    duty = 9'(d);
    repeat (n) to_period_start();
  endtask

  // serial frame of nbits bits; a full frame writes both deadtimes
  task automatic write_dt(input int unsigned ton, input int unsigned toff,
                          input int unsigned nbits);
    logic [2*DT_W-1:0] frame;
    frame = {DT_W'(ton), DT_W'(toff)};
    to_period_start();
    cs_n = 1'b0;
    repeat (4) @(posedge clk);
    for (int i = 2 * int'(DT_W) - 1; i >= 2 * int'(DT_W) - int'(nbits); i--) begin
      sdi = frame[i];
      repeat (4) @(posedge clk);
      sclk = 1'b1;
      repeat (4) @(posedge clk);
      sclk = 1'b0;
    end
    repeat (4) @(posedge clk);
    cs_n = 1'b1;
    repeat (10) @(posedge clk);
    if (nbits == 2 * DT_W) begin
      ton_ref = ton; toff_ref = toff; n_dt_write++;
    end else n_dt_ignored++;
  endtask

  initial begin
    duty = 9'd100; sclk = 1'b0; sdi = 1'b0; cs_n = 1'b1;
    @(posedge clk); @(posedge clk);
    #1 rst_n = 1'b1;
    running = 1'b1;
    p = PERIOD - 1;
    hold(100, 3);                       // reset deadtimes of 4 clocks
    write_dt(6, 9, 2 * DT_W);
    hold(200, 2);
    write_dt(1, 2, 2 * DT_W - 1);       // short frame: ignored
    hold(200, 2);
    // triangle sweep, 0 -> 100 % -> 0, one command step per period
    for (int d = 0; d < PERIOD; d += 3) hold(d, 1);
    hold(PERIOD - 1, 2);
    for (int d = PERIOD - 1; d >= 0; d -= 5) hold(d, 1);
    // step response: 24 % -> 60 % -> 12 %
    hold(123, 3); hold(307, 3); hold(61, 3);
    // zero deadtimes
    write_dt(0, 0, 2 * DT_W);
    hold(0, 2); hold(250, 2); hold(PERIOD - 1, 2); hold(32, 2);
    // long deadtimes, commands where no SR pulse fits
    write_dt(40, 63, 2 * DT_W);
    hold(420, 2); hold(409, 2); hold(408, 2); hold(16, 2);
    for (int k = 0; k < 60; k++) hold($urandom_range(0, PERIOD - 1), 1);
    to_period_start();
    running = 1'b0;
    // every mechanism must have happened at least once
    checks++;
    if (n_seg_change == 0 || n_coarse_only == 0 || n_fine_only == 0 ||
        n_zero == 0 || n_full == 0 || n_sr_dropped == 0 || n_ton_zero == 0 ||
        n_toff_zero == 0 || n_sr_at_start == 0 || n_step < 2 ||
        n_dt_write < 3 || n_dt_ignored == 0) begin
      failures++;
    end
    $display("periods=%0d segment changes=%0d coarse-only=%0d fine-only=%0d zero=%0d full=%0d",
             periods, n_seg_change, n_coarse_only, n_fine_only, n_zero, n_full);
    $display("sr dropped=%0d td_on=0:%0d td_off=0:%0d sr from start=%0d steps=%0d dt writes=%0d ignored=%0d",
             n_sr_dropped, n_ton_zero, n_toff_zero, n_sr_at_start, n_step, n_dt_write, n_dt_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
