// rev_t_ff: reversible master-slave T flip-flop, five gates, three garbage outputs.
//
// A reversible T latch (master) clocked by clk, a reversible NOT gate on the
// master's clock garbage output clk', and a reversible D latch (slave) clocked
// by the inverted clock whose D input is the master's Q_{n+1}. The master
// keeps its own state through its own feedback copy; the slave follows it.
//
// Timing: the master is transparent while clk is 1 and the slave while clk is
// 0, so q takes the value captured by the master when clk falls and holds it
// otherwise (q changes only on a falling edge of clk). Each latch closes its
// own feedback loop through a register clocked by tick, one rising edge per
// truth-table step; tick and the asynchronous active-low reset (clears both
// latches to 0) are this model's own additions.
// The master toggles on every tick while clk and t are both 1, so one toggle
// per clk pulse (the behaviour table: Q_{n+1} = not Q_n after a falling edge
// with T=1) needs clk pulses exactly one tick wide.
//
// Ports: clk, t (inputs); clk_g (slave clk', equals not clk), t_g (T') and
// ds_g (slave D') garbage outputs; q (slave Q_{n+1}).
//
// Origin: the master-slave structure with a NOT gate on the master's clk'
// follows the published design; tick, reset and the pulse-width rule (a
// consequence of the one-register loop model) are this model's.
module rev_t_ff (
  input  logic tick,
  input  logic rst_n,
  input  logic clk,
  input  logic t,
  output logic clk_g,
  output logic t_g,
  output logic ds_g,
  output logic q
);
  logic clk_m;
  logic clk_s;
  logic q_m;

  rev_t_latch u_master (
    .tick, .rst_n, .clk(clk), .t(t),
    .clk_g(clk_m), .t_g(t_g), .q(q_m)
  );

  rev_not u_inv (.a_i(clk_m), .a_o(clk_s));

  rev_d_latch u_slave (
    .tick, .rst_n, .clk(clk_s), .d(q_m),
    .clk_g(clk_g), .d_g(ds_g), .q(q)
  );

  a_edge: assert property (@(posedge tick) disable iff (!rst_n) !$fell(clk) |-> $stable(q));
endmodule
