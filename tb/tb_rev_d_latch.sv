// tb_rev_d_latch: checks the reversible D latch against its augmented truth
// table over a long random sequence of steps.
//
// Each step: inputs change after the falling edge of tick; one time unit later
// the outputs (clk', D', Q_{n+1}) are compared with the table row selected by
// (clk, D, Q_n), where Q_n is the reference state; at the rising edge of tick
// the reference state takes the table's Q_{n+1}. One asynchronous reset in the
// middle of the run, held across a tick edge, is checked to clear the state.
module tb_rev_d_latch;
  int checks = 0, failures = 0;
  int n_transparent = 0, n_hold = 0;

  // augmented table, rows {clk,D,Q_n} -> {clk',D',Q_{n+1}}
  localparam logic [2:0] TABLE2 [8] = '{
    3'b000, 3'b001, 3'b010, 3'b011, 3'b100, 3'b110, 3'b101, 3'b111 };

  logic tick = 1'b0, rst_n = 1'b0, clk = 1'b0, d = 1'b0;
  logic clk_g, d_g, q;
  logic ref_q = 1'b0;

  rev_d_latch dut (.tick, .rst_n, .clk, .d, .clk_g, .d_g, .q);

  always #5 tick = ~tick;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    logic [2:0] row;
    repeat (2) @(posedge tick);
    @(negedge tick);
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      @(negedge tick);
      if (n == 200) begin
        // reset held across one tick edge clears the stored state
        rst_n = 1'b0;
        @(posedge tick);
        @(negedge tick);
        rst_n = 1'b1;
        ref_q = 1'b0;
      end
      clk = 1'($urandom_range(0, 1));
      d   = 1'($urandom_range(0, 1));
      #1;
      row = TABLE2[{clk, d, ref_q}];
      check({clk_g, d_g, q} == row,
            $sformatf("step %0d clk=%b d=%b Qn=%b got %b want %b", n, clk, d, ref_q, {clk_g, d_g, q}, row));
      if (clk) n_transparent++; else n_hold++;
      @(posedge tick);
      ref_q = row[0];
    end
    check(n_transparent > 0 && n_hold > 0, "both latch modes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge tick);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
