// rev_not: reversible NOT gate (a Toffoli gate with no control lines).
//
// a_o = not a_i. It is the only conventional gate that is already reversible.
// In the flip-flops it turns the master latch's clock output into the slave
// latch's clock, so that the slave is transparent while the master holds.
//
// Interface: a_i in, a_o out. Purely combinational.
module rev_not (
  input  logic a_i,
  output logic a_o
);
  always_comb a_o = ~a_i;
endmodule
