// tb_rev_fredkin: exhaustive check of the Fredkin (controlled-swap) gate
// against its printed truth table, plus bijection and self-inverse checks.
module tb_rev_fredkin;
  int checks = 0, failures = 0;

  // rows indexed by {x,y,z}, value {x, y^xy^xz, z^xy^xz}
  localparam logic [2:0] FRED_TABLE [8] = '{
    3'b000, 3'b001, 3'b010, 3'b011, 3'b100, 3'b110, 3'b101, 3'b111 };

  logic x_i, y_i, z_i, x_o, y_o, z_o, x_r, y_r, z_r;

  rev_fredkin dut (.x_i, .y_i, .z_i, .x_o, .y_o, .z_o);
  rev_fredkin inv (.x_i(x_o), .y_i(y_o), .z_i(z_o), .x_o(x_r), .y_o(y_r), .z_o(z_r));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    bit seen [8];
    for (int i = 0; i < 8; i++) begin
      {x_i, y_i, z_i} = 3'(i);
      #1;
      check({x_o, y_o, z_o} == FRED_TABLE[i], $sformatf("row %0d got %b", i, {x_o, y_o, z_o}));
      check({x_r, y_r, z_r} == 3'(i), $sformatf("not self-inverse at %0d", i));
      check(!seen[{x_o, y_o, z_o}], $sformatf("output repeated at %0d", i));
      seen[{x_o, y_o, z_o}] = 1'b1;
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
