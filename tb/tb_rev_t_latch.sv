// tb_rev_t_latch: checks the reversible T latch against its augmented truth
// table over a long random sequence of steps.
//
// Each step: inputs change after the falling edge of tick; one time unit later
// the outputs (clk', T', Q_{n+1}) are compared with the table row selected by
// (clk, T, Q_n), where Q_n is the reference state; at the rising edge of tick
// the reference state takes the table's Q_{n+1}. One asynchronous reset in the
// middle of the run, held across a tick edge, is checked to clear the state.
module tb_rev_t_latch;
  int checks = 0, failures = 0;
  int n_transparent = 0, n_hold = 0, n_toggle = 0;

  // augmented table, rows {clk,T,Q_n} -> {clk',T',Q_{n+1}}
  localparam logic [2:0] TTABLE [8] = '{
    3'b000, 3'b001, 3'b010, 3'b011, 3'b100, 3'b101, 3'b111, 3'b110 };

  logic tick = 1'b0, rst_n = 1'b0, clk = 1'b0, t = 1'b0;
  logic clk_g, t_g, q;
  logic ref_q = 1'b0;

  rev_t_latch dut (.tick, .rst_n, .clk, .t, .clk_g, .t_g, .q);

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
      t   = 1'($urandom_range(0, 1));
      #1;
      row = TTABLE[{clk, t, ref_q}];
      check({clk_g, t_g, q} == row,
            $sformatf("step %0d clk=%b t=%b Qn=%b got %b want %b", n, clk, t, ref_q, {clk_g, t_g, q}, row));
      if (clk) n_transparent++; else n_hold++;
      if (clk && t) n_toggle++;
      @(posedge tick);
      ref_q = row[0];
    end
    check(n_transparent > 0 && n_hold > 0, "both latch modes exercised");
    check(n_toggle > 0, "toggle exercised");
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
