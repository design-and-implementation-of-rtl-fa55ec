// freq_divider: switching-frequency divider of the two-counter DPWM.
//
// Two cascaded down counters divide the master clock. A fine prescaler of
// LSB_BITS bits runs from 2**LSB_BITS-1 to 0 and raises `seg_tick` in its
// zero cycle, once per segment; this tick clocks counter No.1. The segment
// counter, a DIV_W-bit loading down counter, steps on every tick and is
// reloaded with PERIOD_SEGS-1 after it reaches zero. `fs` is high in the last
// clock of each switching period: at the edge that ends it a new period
// begins, the modulators load their duty command and set their outputs.
//
// Switching period = PERIOD_SEGS * 2**LSB_BITS clocks (512 by default, so
// f_s = f_clock / 2**9). The loading down counter of DIV_W = 6 bits follows
// the reference design; the prescaler that makes the segment tick is this
// design's reading of the divider's connection to counter No.1.
module freq_divider #(
  parameter int unsigned LSB_BITS    = dpwm_pkg::LSB_BITS,
  parameter int unsigned DIV_W       = dpwm_pkg::DIV_W,
  parameter int unsigned PERIOD_SEGS = dpwm_pkg::SEGMENTS
) (
  input  logic             clk,
  input  logic             rst_n,     // asynchronous, active low
  output logic             seg_tick,  // last clock of a segment
  output logic             fs,        // last clock of a switching period
  output logic [DIV_W-1:0] seg_count  // segments left in the period
);
  localparam logic [DIV_W-1:0] SEG_LOAD = DIV_W'(PERIOD_SEGS - 1);

  logic [LSB_BITS-1:0] pre;

  initial begin
    assert (PERIOD_SEGS >= 1 && PERIOD_SEGS <= 2 ** DIV_W)
      else $error("PERIOD_SEGS must fit the %0d-bit divider", DIV_W);
  end

  assign seg_tick = (pre == '0);
  assign fs       = seg_tick && (seg_count == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      // reset to the last clock of a period, so that one begins right away
      pre       <= '0;
      seg_count <= '0;
    end else begin
      pre <= pre - 1'b1;                 // wraps from 0 to 2**LSB_BITS-1
      if (seg_tick) begin
        if (seg_count == '0) seg_count <= SEG_LOAD;
        else                 seg_count <= seg_count - 1'b1;
      end
    end
  end
endmodule
