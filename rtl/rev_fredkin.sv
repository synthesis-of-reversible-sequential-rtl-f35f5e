// rev_fredkin: Fredkin gate (controlled swap).
//
// x passes through. When x is 1 the two data lines are exchanged, otherwise
// they pass straight: y_o = y xor xy xor xz and z_o = z xor xy xor xz, which
// is the same as a pair of multiplexers steered by x. The gate is its own
// inverse. With x as a clock, y as the stored state and z as data it is a
// complete D latch next-state function (see rev_d_latch).
//
// Interface: x_i, y_i, z_i in; x_o, y_o, z_o out. Purely combinational.
module rev_fredkin (
  input  logic x_i,
  input  logic y_i,
  input  logic z_i,
  output logic x_o,
  output logic y_o,
  output logic z_o
);
  logic swap_term;

  always_comb begin
    // xy xor xz is nonzero exactly when x=1 and the data lines differ
    swap_term = (x_i & y_i) ^ (x_i & z_i);
    x_o = x_i;
    y_o = y_i ^ swap_term;
    z_o = z_i ^ swap_term;
  end
endmodule
