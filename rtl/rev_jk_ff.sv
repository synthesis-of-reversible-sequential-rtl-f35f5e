// rev_jk_ff: reversible master-slave JK flip-flop, seven gates, four garbage outputs.
//
// A reversible JK latch (master) clocked by clk, a reversible NOT gate on the
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
// With J=K=1 the master toggles on every tick while clk is 1, so the toggle
// row of the behaviour table (Q_{n+1} = not Q_n) needs clk pulses exactly one
// tick wide; hold, reset and set work for any pulse width.
//
// Ports: clk, j, k (inputs); clk_g (slave clk', equals not clk), j_g, k_g
// (master J', K') and ds_g (slave D') garbage outputs; q (slave Q_{n+1}).
//
// Origin: the master-slave structure with a NOT gate on the master's clk'
// follows the published design; tick, reset and the pulse-width rule (a
// consequence of the one-register loop model) are this model's.
module rev_jk_ff (
  input  logic tick,
  input  logic rst_n,
  input  logic clk,
  input  logic j,
  input  logic k,
  output logic clk_g,
  output logic j_g,
  output logic k_g,
  output logic ds_g,
  output logic q
);
  logic clk_m;
  logic clk_s;
  logic q_m;

  rev_jk_latch u_master (
    .tick, .rst_n, .clk(clk), .j(j), .k(k),
    .clk_g(clk_m), .j_g(j_g), .k_g(k_g), .q(q_m)
  );

  rev_not u_inv (.a_i(clk_m), .a_o(clk_s));

  rev_d_latch u_slave (
    .tick, .rst_n, .clk(clk_s), .d(q_m),
    .clk_g(clk_g), .d_g(ds_g), .q(q)
  );

  a_edge: assert property (@(posedge tick) disable iff (!rst_n) !$fell(clk) |-> $stable(q));
endmodule
