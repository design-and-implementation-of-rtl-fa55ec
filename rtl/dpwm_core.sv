// dpwm_core: two-counter digital pulse width modulator.
//
// The rising edge of `pwm` is fixed at the start of every switching period;
// the falling edge is placed by two down counters. At the period boundary
// (`fs` high) counter No.1 loads the MSB_BITS upper bits of `duty` and
// counter No.2 the LSB_BITS lower bits, and flip-flops No.1 and No.2 are set.
// Counter No.1 counts segments (`seg_tick`, 2**LSB_BITS clocks each); when it
// reaches zero its TCD clears flip-flop No.1. The inverted output of
// flip-flop No.1 enables counter No.2 (the AND gate of the reference circuit,
// realised as a clock enable), which then counts master clocks; when it
// reaches zero while flip-flop No.1 is clear, its TCD clears flip-flop No.2,
// whose output is `pwm`.
//
// Timing: if the period starts after the edge that ends the `fs` cycle, pwm
// is high for exactly duty = MSB * 2**LSB_BITS + LSB clocks, starting with
// the first clock of the period (coarse part MSB segments, fine part LSB
// clocks). duty = 0 gives no pulse. The command is sampled only at the
// period boundary, so a new value takes effect in the next period.
// `pwm_fall` is high in the clock whose edge clears pwm.
module dpwm_core #(
  parameter int unsigned MSB_BITS = dpwm_pkg::MSB_BITS,
  parameter int unsigned LSB_BITS = dpwm_pkg::LSB_BITS,
  localparam int unsigned DUTY_W  = MSB_BITS + LSB_BITS
) (
  input  logic              clk,
  input  logic              rst_n,     // asynchronous, active low
  input  logic              fs,        // last clock of the switching period
  input  logic              seg_tick,  // last clock of a segment
  input  logic [DUTY_W-1:0] duty,      // duty command, sampled when fs
  output logic              pwm,       // flip-flop No.2
  output logic              q1,        // flip-flop No.1 (coarse part)
  output logic              tcd1,      // counter No.1 terminal count
  output logic              tcd2,      // counter No.2 terminal count
  output logic              pwm_fall   // pwm goes low at the next edge
);
  logic [MSB_BITS-1:0] cnt1;
  logic [LSB_BITS-1:0] cnt2;
  logic                cnt2_zero;
  logic                q1_n, q1_next;
  logic                pwm_n_unused, pwm_next;

  // counter No.1: coarse part, one count per segment
  prog_down_counter #(.W(MSB_BITS)) u_cnt1 (
    .clk, .rst_n,
    .load     (fs),
    .load_val (duty[DUTY_W-1:LSB_BITS]),
    .en       (seg_tick),
    .count    (cnt1),
    .tcd      (tcd1)
  );

  // flip-flop No.1: set at the period start, cleared by TCD1
  sr_ff u_ff1 (
    .clk, .rst_n,
    .s      (fs),
    .r      (tcd1),
    .q      (q1),
    .q_n    (q1_n),
    .q_next (q1_next)
  );

  // counter No.2: fine part, one count per clock once flip-flop No.1 is clear
  prog_down_counter #(.W(LSB_BITS)) u_cnt2 (
    .clk, .rst_n,
    .load     (fs),
    .load_val (duty[LSB_BITS-1:0]),
    .en       (q1_n),
    .count    (cnt2),
    .tcd      (cnt2_zero)
  );

  // counter No.2 ends the pulse only after the coarse part has ended
  assign tcd2 = cnt2_zero && !q1_next;

  // flip-flop No.2: the DPWM output
  sr_ff u_ff2 (
    .clk, .rst_n,
    .s      (fs),
    .r      (tcd2),
    .q      (pwm),
    .q_n    (pwm_n_unused),
    .q_next (pwm_next)
  );

  assign pwm_fall = pwm && !pwm_next;
endmodule
