// rev_feynman: Feynman gate (2-bit Toffoli, controlled NOT).
//
// x passes through; y_o = x xor y. With y_i tied to constant 0 the gate makes a
// second copy of x, which is how a signal is given a fanout of two in a
// reversible network, where every net may drive exactly one gate input.
//
// Interface: x_i, y_i in; x_o, y_o out. Purely combinational.
module rev_feynman (
  input  logic x_i,
  input  logic y_i,
  output logic x_o,
  output logic y_o
);
  always_comb begin
    x_o = x_i;
    y_o = x_i ^ y_i;
  end
endmodule
