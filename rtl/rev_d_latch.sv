// rev_d_latch: reversible clocked D latch, two gates and two garbage outputs.
//
// The D latch next-state table, extended with the garbage columns clk' and D',
// is exactly the truth table of a Fredkin gate: with clk on the control line,
// the stored value Q_n on the first data line and D on the second, the first
// output is Q_{n+1} = D*clk xor Q_n*(not clk) (D when clk=1, Q_n when clk=0) and
// the second output D' carries whichever value was not selected. A Feynman
// gate with a constant-0 target then copies Q_{n+1}: one copy is the output q,
// the other is fed back as the next Q_n, so no net has a fanout above one.
//
// Timing: the gates are combinational, so q follows d while clk is 1
// (transparent) and holds while clk is 0. The fed-back line is modelled as a
// register clocked by tick: each rising edge of tick is one step n -> n+1 of
// the truth table. tick and rst_n are this model's own additions; the
// asynchronous active-low reset clears the stored Q_n to 0. clk is an
// ordinary data input of the gates, a level, not a clock of this model.
//
// Ports: clk, d (inputs); clk_g (= clk), d_g (D') garbage outputs; q (Q_{n+1}).
//
// Origin: the gate choice, line order and wiring are those of the published
// reversible D latch; the feedback register, tick and reset are not.
module rev_d_latch (
  input  logic tick,
  input  logic rst_n,
  input  logic clk,
  input  logic d,
  output logic clk_g,
  output logic d_g,
  output logic q
);
  logic q_n;      // stored state, the Q_n line
  logic q_next;   // Fredkin output Q_{n+1}
  logic q_copy;   // Feynman copy of Q_{n+1}, fed back

  rev_fredkin u_fredkin (
    .x_i(clk), .y_i(q_n), .z_i(d),
    .x_o(clk_g), .y_o(q_next), .z_o(d_g)
  );

  rev_feynman u_fanout (
    .x_i(q_next), .y_i(1'b0),
    .x_o(q), .y_o(q_copy)
  );

  always_ff @(posedge tick or negedge rst_n)
    if (!rst_n) q_n <= 1'b0;
    else        q_n <= q_copy;

  // While clk is 0 the latch is opaque: the stored value must not change.
  a_hold: assert property (@(posedge tick) disable iff (!rst_n) !clk |=> $stable(q_n));
endmodule
