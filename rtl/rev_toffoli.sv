// rev_toffoli: generalized Toffoli gate TOF(C;T).
//
// The control lines pass through unchanged; the target line is inverted when
// every control line is 1, i.e. tgt_o = (AND of ctrl_i) xor tgt_i. With two
// controls this is the 3-bit Toffoli gate; with tgt_i tied to 0 it gives a
// reversible AND whose control outputs are garbage. The mapping is a
// bijection on NCTRL+1 bits and is its own inverse.
//
// Interface: ctrl_i/ctrl_o (NCTRL bits), tgt_i/tgt_o (1 bit). Purely
// combinational, no clock. NCTRL defaults to 2 (the 3-bit gate); it must be at
// least 1 (a gate with no controls is rev_not).
module rev_toffoli #(
  parameter int unsigned NCTRL = 2
) (
  input  logic [NCTRL-1:0] ctrl_i,
  input  logic             tgt_i,
  output logic [NCTRL-1:0] ctrl_o,
  output logic             tgt_o
);
  always_comb begin
    ctrl_o = ctrl_i;
    tgt_o  = (&ctrl_i) ^ tgt_i;
  end
endmodule
