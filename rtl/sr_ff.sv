// sr_ff: synchronous set-reset flip-flop, reset dominant.
//
// At each clock edge q goes to 0 if `r` is high, else to 1 if `s` is high,
// else holds. `q_next` is the value q takes at the coming edge; the
// two-counter modulator uses it to let counter No.2 see the coarse part end
// in the same cycle as flip-flop No.1 does. `q_n` is the inverted output
// that enables counter No.2. Reset dominance is this design's choice: it
// makes a zero duty command give no pulse at all.
module sr_ff (
  input  logic clk,
  input  logic rst_n,   // asynchronous, active low: q = 0
  input  logic s,
  input  logic r,
  output logic q,
  output logic q_n,
  output logic q_next
);
  always_comb begin
    if (r)      q_next = 1'b0;
    else if (s) q_next = 1'b1;
    else        q_next = q;
  end

  assign q_n = ~q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= q_next;
  end
endmodule
