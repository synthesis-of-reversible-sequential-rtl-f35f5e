// tb_rev_toffoli: exhaustive check of the generalized Toffoli gate.
//
// The 3-bit gate (two controls) is compared row by row with the printed truth
// table of the 3-bit Toffoli gate (x, y, z -> x, y, xy xor z). A 4-control
// instance is checked against the definition TOF(x1..x4; x5): the target flips
// only for the all-ones control pattern. Both are checked to be bijections
// (no two inputs give the same output) and self-inverse.
module tb_rev_toffoli;
  int checks = 0, failures = 0;

  // 3-bit gate: rows indexed by {x,y,z}, value {x,y,xy^z}
  localparam logic [2:0] TOF3_TABLE [8] = '{
    3'b000, 3'b001, 3'b010, 3'b011, 3'b100, 3'b101, 3'b111, 3'b110 };

  logic [1:0] c3_i, c3_o;  logic t3_i, t3_o;
  logic [3:0] c5_i, c5_o;  logic t5_i, t5_o;
  // second gate in cascade for the self-inverse check
  logic [1:0] c3_r; logic t3_r;

  rev_toffoli #(.NCTRL(2)) dut3 (.ctrl_i(c3_i), .tgt_i(t3_i), .ctrl_o(c3_o), .tgt_o(t3_o));
  rev_toffoli #(.NCTRL(2)) inv3 (.ctrl_i(c3_o), .tgt_i(t3_o), .ctrl_o(c3_r), .tgt_o(t3_r));
  rev_toffoli #(.NCTRL(4)) dut5 (.ctrl_i(c5_i), .tgt_i(t5_i), .ctrl_o(c5_o), .tgt_o(t5_o));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    bit seen3 [8];
    bit seen5 [32];
    for (int i = 0; i < 8; i++) begin
      {c3_i, t3_i} = 3'(i);
      #1;
      check({c3_o, t3_o} == TOF3_TABLE[i], $sformatf("TOF3 row %0d got %b", i, {c3_o, t3_o}));
      check({c3_r, t3_r} == 3'(i), $sformatf("TOF3 not self-inverse at %0d", i));
      check(!seen3[{c3_o, t3_o}], $sformatf("TOF3 output repeated at %0d", i));
      seen3[{c3_o, t3_o}] = 1'b1;
    end
    for (int i = 0; i < 32; i++) begin
      logic [4:0] exp;
      {c5_i, t5_i} = 5'(i);
      #1;
      exp = (i >= 30) ? 5'(i ^ 1) : 5'(i);
      check({c5_o, t5_o} == exp, $sformatf("TOF5 row %0d got %b", i, {c5_o, t5_o}));
      check(!seen5[{c5_o, t5_o}], $sformatf("TOF5 output repeated at %0d", i));
      seen5[{c5_o, t5_o}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
