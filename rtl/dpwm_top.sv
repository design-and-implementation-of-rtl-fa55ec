// dpwm_top: 9-bit two-counter DPWM with synchronous rectifier output.
//
// Drives the two switches of a synchronous buck converter from a duty
// command. One frequency divider splits the master clock into switching
// periods of 2**DUTY_W clocks (512) made of SEGMENTS segments (32) of
// 2**LSB_BITS clocks (16). The PWM channel (dpwm_core) raises `pwm` at every
// period start and lowers it after `duty` clocks, counting the upper 5 bits
// in segments and the lower 4 bits in clocks. The SR channel (sr_gen) makes
// the complementary low-side signal `sr` with deadtimes td_on and td_off,
// which are held in registers written over a serial port (deadtime_regs).
//
// Interface: `duty` is sampled at the period boundary, in the clock in which
// `fs` is high, and applies to the period that follows; pwm is then high for
// clocks 0 .. duty-1 of that period and sr for clocks duty+td_off ..
// 511-td_on (no SR pulse if that range is empty). At a 365.7 MHz clock the
// period is 1.4 us, i.e. 714 kHz.
module dpwm_top #(
  parameter int unsigned MSB_BITS = dpwm_pkg::MSB_BITS,
  parameter int unsigned LSB_BITS = dpwm_pkg::LSB_BITS,
  parameter int unsigned DIV_W    = dpwm_pkg::DIV_W,
  parameter int unsigned DT_W     = dpwm_pkg::DT_W,
  localparam int unsigned DUTY_W  = MSB_BITS + LSB_BITS
) (
  input  logic              clk,        // master clock f_clock
  input  logic              rst_n,      // asynchronous, active low
  input  logic [DUTY_W-1:0] duty,       // duty command, in clocks
  input  logic              sclk,       // deadtime serial port clock
  input  logic              sdi,        // deadtime serial port data
  input  logic              cs_n,       // deadtime serial port select
  output logic              pwm,        // high-side switch gate
  output logic              sr,         // low-side (synchronous rectifier) gate
  output logic              fs,         // last clock of each switching period
  output logic [DT_W-1:0]   td_on,      // deadtime in use before pwm rises
  output logic [DT_W-1:0]   td_off      // deadtime in use after pwm falls
);
  logic             seg_tick;
  logic [DIV_W-1:0] seg_count;
  logic             q1, tcd1, tcd2, pwm_fall;
  logic             dt_updated, sr_active;

  freq_divider #(
    .LSB_BITS(LSB_BITS), .DIV_W(DIV_W), .PERIOD_SEGS(2 ** MSB_BITS)
  ) u_div (
    .clk, .rst_n, .seg_tick, .fs, .seg_count
  );

  dpwm_core #(.MSB_BITS(MSB_BITS), .LSB_BITS(LSB_BITS)) u_pwm (
    .clk, .rst_n, .fs, .seg_tick, .duty,
    .pwm, .q1, .tcd1, .tcd2, .pwm_fall
  );

  deadtime_regs #(.DT_W(DT_W)) u_dt (
    .clk, .rst_n, .sclk, .sdi, .cs_n, .td_on, .td_off, .updated(dt_updated)
  );

  sr_gen #(.MSB_BITS(MSB_BITS), .LSB_BITS(LSB_BITS), .DT_W(DT_W)) u_sr (
    .clk, .rst_n, .fs, .seg_tick, .duty, .td_on, .td_off, .sr, .sr_active
  );

  // the two switches must never be on together
  a_no_shoot_through: assert property (@(posedge clk) disable iff (!rst_n)
    !(pwm && sr));
endmodule
