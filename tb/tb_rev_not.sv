// tb_rev_not: checks both rows of the reversible NOT gate.
module tb_rev_not;
  int checks = 0, failures = 0;
  logic a_i, a_o;

  rev_not dut (.a_i, .a_o);

  initial begin
    a_i = 1'b0; #1;
    checks++; if (a_o !== 1'b1) begin failures++; $display("FAIL: not 0"); end
    a_i = 1'b1; #1;
    checks++; if (a_o !== 1'b0) begin failures++; $display("FAIL: not 1"); end
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
