// tb_rev_feynman: exhaustive check of the Feynman gate against its printed
// truth table (x, y -> x, x xor y), including the copy rows y=0.
module tb_rev_feynman;
  int checks = 0, failures = 0;

  localparam logic [1:0] FEYN_TABLE [4] = '{2'b00, 2'b01, 2'b11, 2'b10};

  logic x_i, y_i, x_o, y_o;

  rev_feynman dut (.x_i, .y_i, .x_o, .y_o);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) begin
      {x_i, y_i} = 2'(i);
      #1;
      check({x_o, y_o} == FEYN_TABLE[i], $sformatf("row %0d got %b", i, {x_o, y_o}));
      if (!y_i) check(y_o == x_i, $sformatf("copy failed for x=%b", x_i));
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
