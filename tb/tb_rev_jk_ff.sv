// tb_rev_jk_ff: checks the reversible JK flip-flop against its behaviour table.
//
// clk is driven as pulses separated by 1 to 3 low ticks; j and k change at
// random on every tick. For the first 400 steps the pulses are one tick wide:
// after a falling edge q must be Q_n (J=K=0), 0 (J=0,K=1), 1 (J=1,K=0) or
// not Q_n (J=K=1), with J and K as they were during the pulse. After that
// pulses are 1 to 3 ticks wide and the JK rule is applied once per high tick
// (the master latch acts on every tick). q must hold except after a falling
// edge. Also checked: clk' = not clk;
// J' = J and K' = K while clk is 0; during the pulse the slave's D' output
// carries the value the flip-flop will take.
module tb_rev_jk_ff;
  int checks = 0, failures = 0;
  int n_mode [4];
  int n_hold_hi = 0, n_hold_lo = 0;

  logic tick = 1'b0, rst_n = 1'b0, clk = 1'b0, j = 1'b0, k = 1'b0;
  logic clk_g, j_g, k_g, ds_g, q;
  // from this step on clk pulses are 1 to 3 ticks wide: the master then
  // acts once per tick while clk is high (race-around)
  localparam int LONG_FROM = 400;
  int hi_len = 0, n_long = 0;

  logic ref_q = 1'b0, pending = 1'b0, clk_prev = 1'b0;
  logic [1:0] pend_mode = 2'b00;

  rev_jk_ff dut (.tick, .rst_n, .clk, .j, .k, .clk_g, .j_g, .k_g, .ds_g, .q);

  always #5 tick = ~tick;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic logic jk_next(logic jj, logic kk, logic qn);
    case ({jj, kk})
      2'b00:   return qn;
      2'b01:   return 1'b0;
      2'b10:   return 1'b1;
      default: return ~qn;
    endcase
  endfunction

  initial begin
    int left;
    left = 2;
    repeat (2) @(posedge tick);
    @(negedge tick);
    rst_n = 1'b1;
    for (int n = 0; n < 800; n++) begin
      @(negedge tick);
      if (--left == 0) begin
        clk  = ~clk;
        left = clk ? ((n < LONG_FROM) ? 1 : $urandom_range(1, 3)) : $urandom_range(1, 3);
      end
      j = 1'($urandom_range(0, 1));
      k = 1'($urandom_range(0, 1));
      #1;
      if (clk_prev && !clk) begin
        if (hi_len > 1) n_long++;
        ref_q = pending;
        n_mode[pend_mode]++;
      end else if (!clk && !clk_prev) n_hold_lo++;
      check(q == ref_q, $sformatf("step %0d clk=%b q=%b want %b", n, clk, q, ref_q));
      check(clk_g == ~clk, $sformatf("step %0d clk' wrong", n));
      if (clk) begin
        if (!clk_prev) pending = ref_q;
        hi_len = clk_prev ? hi_len + 1 : 1;
        pending   = jk_next(j, k, pending);
        pend_mode = (!clk_prev) ? {j, k} : pend_mode;
        check(ds_g == pending, $sformatf("step %0d slave D' %b want %b", n, ds_g, pending));
      end else begin
        check(j_g == j && k_g == k, $sformatf("step %0d J'/K' wrong with clk low", n));
      end
      clk_prev = clk;
      @(posedge tick);
      #1;
      if (clk) begin
        check(q == ref_q, $sformatf("step %0d q moved while clk high", n));
        n_hold_hi++;
      end
    end
    check(n_hold_hi > 0 && n_hold_lo > 0 && n_mode[0] > 0 && n_mode[1] > 0 &&
          n_mode[2] > 0 && n_mode[3] > 0, "every row of the behaviour table exercised");
    $display("falling edges JK=00:%0d 01:%0d 10:%0d 11:%0d", n_mode[0], n_mode[1], n_mode[2], n_mode[3]);
    check(n_long > 0, "pulses wider than one tick exercised");
    $display("pulses wider than one tick: %0d", n_long);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge tick);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
