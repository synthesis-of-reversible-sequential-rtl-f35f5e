// tb_rev_d_ff: checks the reversible D flip-flop against its behaviour table.
//
// clk is driven as pulses of random width (1 to 3 ticks high, 1 to 3 low) and
// d changes at random on every tick. The reference keeps the output value and
// the value pending in the master (d at the last tick with clk high); q must
// hold while clk is 0 or 1 and take the pending value once clk has fallen.
// Also checked every step: clk' = not clk; while clk is 1 the slave's D'
// output carries the master's next value (d), and after a falling edge the
// master's D' carries d (the master is opaque, so D' = d).
module tb_rev_d_ff;
  int checks = 0, failures = 0;
  int n_fall0 = 0, n_fall1 = 0, n_hold_hi = 0, n_hold_lo = 0;

  logic tick = 1'b0, rst_n = 1'b0, clk = 1'b0, d = 1'b0;
  logic clk_g, dm_g, ds_g, q;
  logic ref_q = 1'b0, pending = 1'b0, clk_prev = 1'b0;

  rev_d_ff dut (.tick, .rst_n, .clk, .d, .clk_g, .dm_g, .ds_g, .q);

  always #5 tick = ~tick;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    int left;
    left = 2;
    repeat (2) @(posedge tick);
    @(negedge tick);
    rst_n = 1'b1;
    for (int n = 0; n < 600; n++) begin
      @(negedge tick);
      if (--left == 0) begin
        clk  = ~clk;
        left = $urandom_range(1, 3);
      end
      d = 1'($urandom_range(0, 1));
      #1;
      if (clk_prev && !clk) begin
        ref_q = pending;
        if (pending) n_fall1++; else n_fall0++;
      end else if (clk && clk_prev) n_hold_hi++;
      else if (!clk && !clk_prev) n_hold_lo++;
      check(q == ref_q, $sformatf("step %0d clk=%b q=%b want %b", n, clk, q, ref_q));
      check(clk_g == ~clk, $sformatf("step %0d clk' wrong", n));
      if (clk) begin
        check(ds_g == d, $sformatf("step %0d slave D' %b want %b", n, ds_g, d));
        pending = d;
      end else begin
        check(dm_g == d, $sformatf("step %0d master D' %b want %b", n, dm_g, d));
      end
      clk_prev = clk;
      @(posedge tick);
    end
    check(n_fall0 > 0 && n_fall1 > 0 && n_hold_hi > 0 && n_hold_lo > 0,
          "every row of the behaviour table exercised");
    $display("falling edges d=0:%0d d=1:%0d, hold steps clk=1:%0d clk=0:%0d",
             n_fall0, n_fall1, n_hold_hi, n_hold_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1500) @(posedge tick);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
