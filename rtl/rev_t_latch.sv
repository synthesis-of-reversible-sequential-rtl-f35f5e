// rev_t_latch: reversible clocked T latch, two gates and two garbage outputs.
//
// The T latch next state is Q_{n+1} = T*clk xor Q_n, which is what a 3-bit
// Toffoli gate computes on its target line when T and clk are its controls and
// Q_n its target; T and clk pass through as the garbage outputs T' and clk'.
// A Feynman gate with a constant-0 target copies Q_{n+1}: one copy is the
// output q, the other is fed back as the next Q_n.
//
// Timing: q = Q_n xor (T and clk) combinationally. The fed-back line is a
// register clocked by tick, one rising edge per truth-table step n -> n+1, so
// while clk and T are both 1 the latch toggles on every tick; a clk pulse one
// tick wide toggles it once. tick and the asynchronous active-low reset
// (clears Q_n to 0) are this model's own additions.
//
// Ports: clk, t (inputs); clk_g (= clk), t_g (= T) garbage outputs; q (Q_{n+1}).
//
// Origin: the gate choice and wiring are those of the published reversible
// T latch; the feedback register, tick and reset are not.
module rev_t_latch (
  input  logic tick,
  input  logic rst_n,
  input  logic clk,
  input  logic t,
  output logic clk_g,
  output logic t_g,
  output logic q
);
  logic q_n;
  logic q_next;
  logic q_copy;

  rev_toffoli #(.NCTRL(2)) u_toffoli (
    .ctrl_i({t, clk}), .tgt_i(q_n),
    .ctrl_o({t_g, clk_g}), .tgt_o(q_next)
  );

  rev_feynman u_fanout (
    .x_i(q_next), .y_i(1'b0),
    .x_o(q), .y_o(q_copy)
  );

  always_ff @(posedge tick or negedge rst_n)
    if (!rst_n) q_n <= 1'b0;
    else        q_n <= q_copy;

  a_hold: assert property (@(posedge tick) disable iff (!rst_n) !clk |=> $stable(q_n));
endmodule
