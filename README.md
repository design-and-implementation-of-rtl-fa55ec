# Two-counter 9-bit digital PWM with synchronous-rectifier output

A counter-based digital PWM needs a clock 2^N times the switching frequency
to reach N bits of duty resolution. This design builds the pulse from two
shorter counters instead of one long one. The upper 5 bits of the duty
command set a coarse part, counted in *segments* of 16 clocks. The lower
4 bits then add a fine part, counted in single clocks. The result is a 9-bit
trailing-edge modulator for the high-side switch of a synchronous buck
converter. Alongside it is a complementary low-side (synchronous rectifier,
SR) gate signal with programmable deadtimes.

Its place in a digitally controlled converter: an ADC and a control law
(not part of this RTL) compute the duty command. This block turns the command
into the two gate signals `pwm` and `sr`.

## One switching period

A period is 512 master clocks: 32 segments of 16 clocks each. A period
starts after the clock in which `fs` is high. With duty command `D = 16*M + L`
(M = `duty[8:4]`, L = `duty[3:0]`):

| clocks of the period | `pwm` | `sr` (td_on, td_off in clocks)          |
|----------------------|-------|-----------------------------------------|
| 0 .. 16M-1           | high  | low                                     |
| 16M .. D-1           | high  | low                                     |
| D .. D+td_off-1      | low   | low (deadtime after the PWM falling edge)|
| D+td_off .. 511-td_on| low   | high                                    |
| 512-td_on .. 511     | low   | low (deadtime before the next rising edge)|

The first row is the coarse part and the second row the fine part. `pwm`
rises at every period start. Only its falling edge moves with the command.
The pulse is exactly `D` clocks long, so the duty ratio is `D/512` for every
code. `D = 0` gives no pulse and `D = 511` gives 511/512. The command, and
the deadtimes, are sampled at the period boundary. A change of command
therefore appears in the very next period, which is what makes the
modulator's transient response fast.

Frequencies: f_s = f_clk / 512. A 714 kHz switching frequency needs a
365.7 MHz clock. At 100 MHz the same RTL switches at 195 kHz. To trade
resolution for frequency at a fixed clock, change `MSB_BITS` / `LSB_BITS`
(see *Changing it*).

## How the two counters make the pulse

`dpwm_core` has two loadable down counters (`prog_down_counter`) and two
set/reset flip-flops (`sr_ff`):

1. At the period boundary (`fs`), counter No.1 loads M and counter No.2
   loads L. Both flip-flops are set.
2. Counter No.1 steps once per segment (`seg_tick` from `freq_divider`).
   When it reaches zero, its terminal count `tcd1` clears flip-flop No.1.
   That ends the coarse part after 16*M clocks.
3. The inverted output of flip-flop No.1 enables counter No.2, which then
   steps on every clock. When counter No.2 is at zero *and* flip-flop No.1 is
   clear, `tcd2` clears flip-flop No.2. That ends the pulse L clocks later.
   Flip-flop No.2 is `pwm`.

Three details make the width exact. They are what to keep in mind when
changing the core:

- **Terminal count looks one edge ahead.** `tcd` of a counter means "the
  count is zero after the coming edge". The flip-flop it clears therefore
  falls at the same edge at which the counter reaches zero, not one clock
  later. Without this, every pulse would grow by one clock per stage.
- **Counter No.2 must wait for the coarse part.** `tcd2` is gated with the
  next state of flip-flop No.1. Without that gate, a command with L = 0 and
  M > 0 would end the pulse at the period start.
- **Reset dominates set.** At `D = 0`, both terminal counts are already
  active at the boundary, so the flip-flops stay low and no glitch pulse
  appears.

Once they reach zero, the counters hold there and do not wrap. Each terminal
count then stays active until the next load.

The original circuit clocks counter No.2 through an AND gate of the clock
and flip-flop No.1's inverted output. Here that gate is a clock enable, so
the whole design runs on one clock with no gated clocks.

## Frequency divider

`freq_divider` has two parts:

- a 4-bit prescaler that runs down from 15 and raises `seg_tick` in its last
  clock;
- a 6-bit loading down counter of segments, reloaded with 31 once it reaches
  zero.

`fs` is high when both are zero, i.e. in the last clock of the period. After
reset the divider sits in that last clock, so the first period starts at the
first clock edge. The PWM channel and both SR channels share the divider.

## Synchronous-rectifier signal and deadtimes

`sr_gen` uses two more `dpwm_core` instances:

- channel A gets the command `D + td_off`;
- channel B gets the command `512 - td_on`.

A set/reset flip-flop is set by A's falling edge and cleared by B's falling
edge. Each core reports that edge as `pwm_fall`, one clock ahead, so `sr`
switches at the same edge as the channel output would fall.

Rules added by this design, beyond plain edge combining:

- If `D + td_off >= 512 - td_on`, no SR pulse fits. That period has none
  (`sr_active` low). This keeps `pwm` and `sr` from ever overlapping. An
  assertion in `dpwm_top` checks this.
- If `td_on = 0`, channel B would need a full-period pulse. `sr` is then
  cleared at the period boundary instead.
- If `D + td_off = 0`, channel A has no falling edge. `sr` is then set at the
  period boundary.

`deadtime_regs` holds `td_on` and `td_off` (6 bits each, reset value 4
clocks) and loads them over a three-wire serial port:

- Pull `cs_n` low.
- Shift 12 bits on rising edges of `sclk`, most significant bit first:
  `td_on[5:0]`, then `td_off[5:0]`.
- Raise `cs_n`. The values are taken only if exactly 12 bits arrived.

The pins are synchronised to `clk`, so `sclk` must run at no more than
`clk/4`. New values take effect at the next period boundary.

## What follows the reference design and what is this design's own

These follow the reference design:

- the 5 + 4 bit split;
- the 6-bit loading down counter in the divider;
- counter, flip-flop and AND-gate connections, and the terminal counts
  resetting the flip-flops;
- the trailing-edge modulation with a fixed rising edge;
- the D + td_off / T - td_on SR scheme with an SR flip-flop triggered by
  falling edges;
- deadtimes held in externally programmable registers.

These are this design's own choices:

- The period is 2^9 clocks. One published figure is a 100 MHz clock for a
  714 kHz, 9-bit modulator. Those three numbers cannot hold together, so
  the rule f_clk = 2^N x f_s was kept.
- The switching period has 32 segments. The source also speaks of 8 segments
  and of a fine part up to t_s/8. Neither fits a 5-bit coarse counter, so
  both were set aside.
- Counter No.1 is driven by a segment tick from the divider.
- Terminal counts are active high. The original TCD pulses are active low.
- The timing-exact terminal counts and the reset-dominant flip-flops.
- Everything in the SR section listed under "Rules added by this design".
- The serial frame format and the deadtime register width and reset values.
- An asynchronous active-low reset.

Not implemented:

- the internal deadtime look-up table (its contents are not specified);
- a multi-phase configuration (claimed possible, not described);
- the clock generator, ADC, control law and power stage, which lie outside
  the modulator.

## Files

| file | contents |
|------|----------|
| `rtl/dpwm_pkg.sv` | shared sizes: 5 + 4 bits, 6-bit divider, 32 segments, 6-bit deadtimes |
| `rtl/prog_down_counter.sv` | loadable down counter with look-ahead terminal count |
| `rtl/sr_ff.sv` | reset-dominant set/reset flip-flop |
| `rtl/freq_divider.sv` | segment tick and period strobe |
| `rtl/dpwm_core.sv` | the two-counter modulator |
| `rtl/sr_gen.sv` | SR gate signal from two further modulators |
| `rtl/deadtime_regs.sv` | deadtime registers and serial port |
| `rtl/dpwm_top.sv` | complete design (top) |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. For example, the end-to-end test:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        --top-module tb_dpwm_top rtl/dpwm_pkg.sv tb/tb_dpwm_top.sv
    ./obj_dir/Vtb_dpwm_top

The other testbenches build the same way with their own names. All of them
run at the default sizes in well under a second.

What they establish:

- `tb_dpwm_core` runs every command 0..511 plus random ones. It checks
  `pwm`, flip-flop No.1 and `pwm_fall` clock by clock against `p < D` and
  `p < 16M`.
- `tb_sr_gen` runs random and corner-case commands and deadtimes, and checks
  the SR window clock by clock.
- `tb_dpwm_top` drives the whole design through a 0→100 %→0 triangle sweep,
  24 % → 60 % → 12 % command steps, three serial deadtime writes and one
  rejected short frame. It also covers zero and large deadtimes. It checks
  `fs`, `pwm`, `sr` and the registers every clock against an independent
  model. It fails if any of these mechanisms never occurred:
  - a segment change;
  - a coarse-only pulse (L = 0);
  - a fine-only pulse (M = 0);
  - zero duty and full duty;
  - a dropped SR pulse;
  - td_on = 0 and td_off = 0;
  - an SR pulse that starts at the period boundary.
- The counter, flip-flop, divider and serial-register testbenches compare
  against reference models with random stimulus.

## Changing it

- `MSB_BITS` and `LSB_BITS` (in `dpwm_top`, defaults from `dpwm_pkg`) set
  the split. A segment is 2^LSB_BITS clocks and a period 2^(MSB_BITS+LSB_BITS)
  clocks.
- Only the total width sets the resolution. The split sets how long the
  coarse counter is compared with the fine one.
- `DIV_W` must hold 2^MSB_BITS - 1. `DT_W` must stay below the command
  width.
- `freq_divider` alone also accepts a `PERIOD_SEGS` longer than the command
  range. `sr_gen` assumes the period equals the command range, so
  `dpwm_top` ties the two together.
