// tb_rev_t_ff: checks the reversible T flip-flop against its behaviour table.
//
// clk is driven as pulses separated by 1 to 3 low ticks; t changes at random
// on every tick. For the first 400 steps the pulses are one tick wide, the
// pulsed clock the flip-flop is meant for: after a falling edge q becomes
// not Q_n if T was 1 during the pulse, else Q_n. After that pulses are 1 to 3
// ticks wide and the master acts once per tick while clk is high, so q takes
// Q_n xor all the T values of the pulse. q must hold except after a falling
// edge. Also checked:
// clk' = not clk, T' = T, and during the pulse the slave's D' output carries
// the value the flip-flop will take.
module tb_rev_t_ff;
  int checks = 0, failures = 0;
  int n_toggle = 0, n_keep = 0, n_hold_hi = 0, n_hold_lo = 0;

  logic tick = 1'b0, rst_n = 1'b0, clk = 1'b0, t = 1'b0;
  logic clk_g, t_g, ds_g, q;
  // from this step on clk pulses are 1 to 3 ticks wide: the master then
  // acts once per tick while clk is high (race-around)
  localparam int LONG_FROM = 400;
  int hi_len = 0, n_long = 0;

  logic ref_q = 1'b0, pending = 1'b0, clk_prev = 1'b0;

  rev_t_ff dut (.tick, .rst_n, .clk, .t, .clk_g, .t_g, .ds_g, .q);

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
        left = clk ? ((n < LONG_FROM) ? 1 : $urandom_range(1, 3)) : $urandom_range(1, 3);
      end
      t = 1'($urandom_range(0, 1));
      #1;
      if (clk_prev && !clk) begin
        if (hi_len > 1) n_long++;
        if (pending != ref_q) n_toggle++; else n_keep++;
        ref_q = pending;
      end else if (!clk && !clk_prev) n_hold_lo++;
      check(q == ref_q, $sformatf("step %0d clk=%b q=%b want %b", n, clk, q, ref_q));
      check(clk_g == ~clk, $sformatf("step %0d clk' wrong", n));
      check(t_g == t, $sformatf("step %0d T' wrong", n));
      if (clk) begin
        if (!clk_prev) pending = ref_q;
        hi_len = clk_prev ? hi_len + 1 : 1;
        pending = pending ^ t;
        check(ds_g == pending, $sformatf("step %0d slave D' %b want %b", n, ds_g, pending));
      end
      clk_prev = clk;
      @(posedge tick);
      // q must not move while clk is high (checked just after the tick edge)
      #1;
      if (clk) begin
        check(q == ref_q, $sformatf("step %0d q moved while clk high", n));
        n_hold_hi++;
      end
    end
    check(n_toggle > 0 && n_keep > 0 && n_hold_hi > 0 && n_hold_lo > 0,
          "every row of the behaviour table exercised");
    $display("toggles:%0d keeps:%0d hold steps clk=1:%0d clk=0:%0d",
             n_toggle, n_keep, n_hold_hi, n_hold_lo);
    check(n_long > 0, "pulses wider than one tick exercised");
    $display("pulses wider than one tick: %0d", n_long);
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
