// rev_jk_latch: reversible clocked JK latch, four gates and three garbage outputs.
//
// The JK next-state table, extended with the garbage columns clk', J' and K',
// is a permutation of the 16 patterns (clk, J, K, Q_n). Transformation-based
// synthesis of that permutation gives a cascade of three generalized Toffoli
// gates, applied in this order:
//   1. TOF(clk, J, Q_n; K):   K'      = J*clk*Q_n xor K
//   2. TOF(clk, Q_n, K'; J):  J'      = K'*Q_n*clk xor J
//   3. TOF(clk, J'; Q_n):     Q_{n+1} = J'*clk xor Q_n
// which works out to Q_{n+1} = J*clk xor Q_n xor Q_n*clk*K xor Q_n*clk*J:
// Q_n while clk=0, and the JK rule (hold, reset, set, toggle) while clk=1.
// A Feynman gate with a constant-0 target copies Q_{n+1} for the feedback.
//
// Timing: q is combinational in (clk, j, k, Q_n). The fed-back line is a
// register clocked by tick, one rising edge per truth-table step, so with
// J=K=1 and clk=1 the latch toggles on every tick. tick and the asynchronous
// active-low reset (clears Q_n to 0) are this model's own additions.
//
// Ports: clk, j, k (inputs); clk_g (= clk), j_g (J'), k_g (K') garbage
// outputs; q (Q_{n+1}).
//
// Origin: the table, the three-gate cascade and the Feynman copy are those of
// the published reversible JK latch; the feedback register, tick and reset
// are not.
module rev_jk_latch (
  input  logic tick,
  input  logic rst_n,
  input  logic clk,
  input  logic j,
  input  logic k,
  output logic clk_g,
  output logic j_g,
  output logic k_g,
  output logic q
);
  logic q_n;
  logic q_copy;
  // line values between the gates: {clk, j, k, q} after each stage
  logic c1, j1, q1;         // after gate 1 (k line becomes k1)
  logic k1;
  logic c2, q2, k2;         // after gate 2 (j line becomes j2)
  logic j2;
  logic q3;                 // after gate 3 (Q_n line becomes Q_{n+1})

  rev_toffoli #(.NCTRL(3)) u_g1 (
    .ctrl_i({clk, j, q_n}), .tgt_i(k),
    .ctrl_o({c1, j1, q1}),  .tgt_o(k1)
  );

  rev_toffoli #(.NCTRL(3)) u_g2 (
    .ctrl_i({c1, q1, k1}), .tgt_i(j1),
    .ctrl_o({c2, q2, k2}), .tgt_o(j2)
  );

  rev_toffoli #(.NCTRL(2)) u_g3 (
    .ctrl_i({c2, j2}),     .tgt_i(q2),
    .ctrl_o({clk_g, j_g}), .tgt_o(q3)
  );

  assign k_g = k2;

  rev_feynman u_fanout (
    .x_i(q3), .y_i(1'b0),
    .x_o(q), .y_o(q_copy)
  );

  always_ff @(posedge tick or negedge rst_n)
    if (!rst_n) q_n <= 1'b0;
    else        q_n <= q_copy;

  a_hold: assert property (@(posedge tick) disable iff (!rst_n) !clk |=> $stable(q_n));
endmodule
