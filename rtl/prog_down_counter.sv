// prog_down_counter: loadable (programmable) down counter with terminal count.
//
// On `load` the counter takes `load_val`; otherwise, when `en` is high, it
// counts down by one per clock and stops at zero instead of wrapping. The
// terminal-count flag `tcd` is high whenever the count after the coming clock
// edge is zero, so it goes high in the cycle in which the count steps from 1
// to 0 (or is loaded with 0) and stays high until the next load. This is the
// TCD output of the counters No.1 and No.2 of the two-counter modulator,
// except that it is active high here (the reference circuit's TCD is an
// active-low underflow pulse). Reporting the next-state zero lets the
// flip-flop that `tcd` clears change at the same edge as the counter does.
//
// Timing: one clock per count; load has priority over counting.
module prog_down_counter #(
  parameter int unsigned W = 5
) (
  input  logic         clk,
  input  logic         rst_n,     // asynchronous, active low: count = 0
  input  logic         load,      // load load_val at the next edge
  input  logic [W-1:0] load_val,
  input  logic         en,        // count enable
  output logic [W-1:0] count,
  output logic         tcd        // count is zero after the next edge
);
  logic [W-1:0] count_d;

  always_comb begin
    if (load)                    count_d = load_val;
    else if (en && count != '0)  count_d = count - 1'b1;
    else                         count_d = count;
  end

  assign tcd = (count_d == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) count <= '0;
    else        count <= count_d;
  end
endmodule
