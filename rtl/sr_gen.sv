// sr_gen: synchronous rectifier (low-side switch) gate signal with deadtime.
//
// The SR signal is the complement of the PWM signal with a deadtime on either
// side: it rises td_off clocks after the PWM falling edge and falls td_on
// clocks before the next PWM rising edge. Two more two-counter modulators,
// driven by the same frequency divider as the PWM channel, place these edges:
// channel A gets duty D + td_off and channel B gets T - td_on, T being the
// period of 2**DUTY_W clocks. A set-reset flip-flop (reset dominant) is set
// by the falling edge of channel A and cleared by the falling edge of
// channel B, which is what the falling-edge triggered flip-flop of the
// reference circuit does, here in synchronous form.
//
// This design's own choices: when D + td_off is not below T - td_on the SR
// pulse of that period is dropped (the switch stays off), so the two gate
// signals can never overlap; with td_on = 0 channel B would need a full
// period, so the SR signal is instead cleared at the period boundary itself.
// The command and the deadtimes are sampled at the period boundary (`fs`).
//
// Timing: with the period starting after the `fs` edge, sr is high from
// clock D + td_off to clock T - td_on - 1 of the period.
module sr_gen #(
  parameter int unsigned MSB_BITS = dpwm_pkg::MSB_BITS,
  parameter int unsigned LSB_BITS = dpwm_pkg::LSB_BITS,
  parameter int unsigned DT_W     = dpwm_pkg::DT_W,
  localparam int unsigned DUTY_W  = MSB_BITS + LSB_BITS
) (
  input  logic              clk,
  input  logic              rst_n,     // asynchronous, active low
  input  logic              fs,        // last clock of the switching period
  input  logic              seg_tick,  // last clock of a segment
  input  logic [DUTY_W-1:0] duty,      // D, the PWM duty command
  input  logic [DT_W-1:0]   td_on,     // deadtime before the PWM rising edge
  input  logic [DT_W-1:0]   td_off,    // deadtime after the PWM falling edge
  output logic              sr,        // synchronous rectifier gate signal
  output logic              sr_active  // an SR pulse is allowed this period
);
  localparam logic [DUTY_W:0] PERIOD = (DUTY_W + 1)'(2 ** DUTY_W);

  initial begin
    assert (DT_W < DUTY_W) else $error("deadtime must be shorter than a period");
  end

  logic [DUTY_W:0] rise_at, fall_at;   // SR edges, clocks into the period
  logic            fall_a, fall_b;
  logic            sr_en_d, td_on_zero_q, set_at_start;
  logic            pwm_a, pwm_b;
  logic            q1_a, q1_b, tcd1_a, tcd1_b, tcd2_a, tcd2_b;
  logic            sr_n_unused, sr_next_unused;

  assign rise_at = {1'b0, duty} + (DUTY_W + 1)'(td_off);
  assign fall_at = PERIOD - (DUTY_W + 1)'(td_on);
  assign sr_en_d = (rise_at < fall_at);
  // the SR pulse starts with the period: no falling edge of channel A to use
  assign set_at_start = fs && sr_en_d && (rise_at == '0);

  dpwm_core #(.MSB_BITS(MSB_BITS), .LSB_BITS(LSB_BITS)) u_dpwm_a (
    .clk, .rst_n, .fs, .seg_tick,
    .duty     (rise_at[DUTY_W-1:0]),
    .pwm      (pwm_a),
    .q1       (q1_a),
    .tcd1     (tcd1_a),
    .tcd2     (tcd2_a),
    .pwm_fall (fall_a)
  );

  dpwm_core #(.MSB_BITS(MSB_BITS), .LSB_BITS(LSB_BITS)) u_dpwm_b (
    .clk, .rst_n, .fs, .seg_tick,
    .duty     (fall_at[DUTY_W-1:0]),
    .pwm      (pwm_b),
    .q1       (q1_b),
    .tcd1     (tcd1_b),
    .tcd2     (tcd2_b),
    .pwm_fall (fall_b)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr_active    <= 1'b0;
      td_on_zero_q <= 1'b0;
    end else if (fs) begin
      sr_active    <= sr_en_d;
      td_on_zero_q <= (td_on == '0);
    end
  end

  sr_ff u_ff_sr (
    .clk, .rst_n,
    .s      (set_at_start || (fall_a && sr_active)),
    .r      (td_on_zero_q ? (fs && !set_at_start) : fall_b),
    .q      (sr),
    .q_n    (sr_n_unused),
    .q_next (sr_next_unused)
  );
endmodule
