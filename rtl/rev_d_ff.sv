// rev_d_ff: reversible master-slave D flip-flop, five gates, three garbage outputs.
//
// Built like a conventional master-slave flip-flop with every part replaced by
// its reversible counterpart: a reversible D latch (master) clocked by clk, a
// reversible NOT gate on the master's clock garbage output clk', and a second
// reversible D latch (slave) clocked by that inverted clock whose D input is
// the master's Q_{n+1}. The slave's clk' output is the flip-flop's clk'.
//
// Timing: the master is transparent while clk is 1 and the slave while clk is
// 0, so q takes the value captured by the master when clk falls and holds it
// otherwise (q changes only on a falling edge of clk). Each latch closes its
// own feedback loop through a register clocked by tick, one rising edge per
// truth-table step; tick and the asynchronous active-low reset (clears both
// latches to 0) are this model's own additions.
//
// Ports: clk, d (inputs); clk_g (slave clk', equals not clk), dm_g and ds_g
// (D' of master and slave) garbage outputs; q (slave Q_{n+1}).
//
// Origin: the master-slave structure with a NOT gate on the master's clk'
// follows the published design; tick and reset are this model's.
module rev_d_ff (
  input  logic tick,
  input  logic rst_n,
  input  logic clk,
  input  logic d,
  output logic clk_g,
  output logic dm_g,
  output logic ds_g,
  output logic q
);
  logic clk_m;   // master clk' garbage line, into the NOT gate
  logic clk_s;   // inverted clock for the slave
  logic q_m;     // master Q_{n+1}, slave D

  rev_d_latch u_master (
    .tick, .rst_n, .clk(clk), .d(d),
    .clk_g(clk_m), .d_g(dm_g), .q(q_m)
  );

  rev_not u_inv (.a_i(clk_m), .a_o(clk_s));

  rev_d_latch u_slave (
    .tick, .rst_n, .clk(clk_s), .d(q_m),
    .clk_g(clk_g), .d_g(ds_g), .q(q)
  );

  a_edge: assert property (@(posedge tick) disable iff (!rst_n) !$fell(clk) |-> $stable(q));
endmodule
