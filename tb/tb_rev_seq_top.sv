// tb_rev_seq_top: end-to-end test of the whole element library.
//
// All six elements run at once from independent random stimulus, sharing tick
// and rst_n. Latches get a random clk level on every tick; the D flip-flop
// gets clk pulses of random width, the T and JK flip-flops one-tick pulses.
// References:
//   latches     - the augmented truth tables (D, T, JK), stepped once per tick
//   flip-flops  - the behaviour tables: q changes only after clk falls, to
//                 D / Q_n xor T / the JK rule with the inputs of the pulse
// Every step compares every q and every garbage output that the tables fix.
// Half way through, reset is held across one tick edge and every element must
// restart from 0. Each mechanism (latch transparent / opaque, T toggle, JK
// hold / reset / set / toggle, flip-flop capture of 0 and 1, flip-flop toggle,
// asynchronous reset) is counted; one that never happens is a failure.
module tb_rev_seq_top;
  int checks = 0, failures = 0;

  localparam logic [2:0] DTABLE [8] = '{
    3'b000, 3'b001, 3'b010, 3'b011, 3'b100, 3'b110, 3'b101, 3'b111 };
  localparam logic [2:0] TTABLE [8] = '{
    3'b000, 3'b001, 3'b010, 3'b011, 3'b100, 3'b101, 3'b111, 3'b110 };
  localparam logic [3:0] JKTABLE [16] = '{
    4'b0000, 4'b0001, 4'b0010, 4'b0011, 4'b0100, 4'b0101, 4'b0110, 4'b0111,
    4'b1000, 4'b1001, 4'b1010, 4'b1110, 4'b1101, 4'b1011, 4'b1111, 4'b1100 };

  logic tick = 1'b0, rst_n = 1'b0;
  logic dl_clk = 0, dl_d = 0, dl_clk_g, dl_d_g, dl_q;
  logic tl_clk = 0, tl_t = 0, tl_clk_g, tl_t_g, tl_q;
  logic jl_clk = 0, jl_j = 0, jl_k = 0, jl_clk_g, jl_j_g, jl_k_g, jl_q;
  logic dff_clk = 0, dff_d = 0, dff_clk_g, dff_dm_g, dff_ds_g, dff_q;
  logic tff_clk = 0, tff_t = 0, tff_clk_g, tff_t_g, tff_ds_g, tff_q;
  logic jkff_clk = 0, jkff_j = 0, jkff_k = 0, jkff_clk_g, jkff_j_g, jkff_k_g, jkff_ds_g, jkff_q;

  rev_seq_top dut (.*);

  always #5 tick = ~tick;

  // mechanism counters
  int n_dl_open = 0, n_dl_hold = 0, n_tl_toggle = 0, n_tl_hold = 0;
  int n_jl [5];                  // 0..3: clk=1 with JK=00..11, 4: clk=0
  int n_dff_cap [2];
  int n_tff_toggle = 0, n_tff_keep = 0;
  int n_jkff [4];
  int n_reset = 0;

  // reference state
  logic r_dl = 0, r_tl = 0, r_jl = 0;
  logic r_dff = 0, r_tff = 0, r_jkff = 0;
  logic p_dff = 0, p_tff = 0, p_jkff = 0;   // values pending in the masters
  logic [1:0] p_jkmode = 0;
  logic c_dff = 0, c_tff = 0, c_jkff = 0;   // clk of the previous step

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
    int left_d, left_t, left_jk;
    logic [2:0] rd, rt;
    logic [3:0] rj;
    left_d = 2; left_t = 3; left_jk = 4;
    repeat (2) @(posedge tick);
    @(negedge tick);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge tick);
      if (n == 1000) begin
        rst_n = 1'b0;
        @(posedge tick);
        @(negedge tick);
        rst_n = 1'b1;
        {r_dl, r_tl, r_jl, r_dff, r_tff, r_jkff} = '0;
        {p_dff, p_tff, p_jkff} = '0;
        // flip-flop clocks are left low across the reset
        {dff_clk, tff_clk, jkff_clk} = '0;
        {c_dff, c_tff, c_jkff} = '0;
        {dff_d, tff_t, jkff_j, jkff_k} = '0;
        #1;
        check({dff_q, tff_q, jkff_q} == 3'b000, "flip-flops cleared by reset");
        n_reset++;
        left_d = 1; left_t = 2; left_jk = 3;
        @(negedge tick);
      end
      // latch stimulus
      {dl_clk, dl_d, tl_clk, tl_t, jl_clk, jl_j, jl_k} = 7'($urandom);
      // flip-flop clocks
      if (--left_d == 0)  begin dff_clk  = ~dff_clk;  left_d  = $urandom_range(1, 3); end
      if (--left_t == 0)  begin tff_clk  = ~tff_clk;  left_t  = tff_clk  ? 1 : $urandom_range(1, 3); end
      if (--left_jk == 0) begin jkff_clk = ~jkff_clk; left_jk = jkff_clk ? 1 : $urandom_range(1, 3); end
      {dff_d, tff_t, jkff_j, jkff_k} = 4'($urandom);
      #1;

      // latches against their augmented tables
      rd = DTABLE[{dl_clk, dl_d, r_dl}];
      rt = TTABLE[{tl_clk, tl_t, r_tl}];
      rj = JKTABLE[{jl_clk, jl_j, jl_k, r_jl}];
      check({dl_clk_g, dl_d_g, dl_q} == rd, $sformatf("step %0d D latch %b want %b", n, {dl_clk_g, dl_d_g, dl_q}, rd));
      check({tl_clk_g, tl_t_g, tl_q} == rt, $sformatf("step %0d T latch %b want %b", n, {tl_clk_g, tl_t_g, tl_q}, rt));
      check({jl_clk_g, jl_j_g, jl_k_g, jl_q} == rj, $sformatf("step %0d JK latch %b want %b", n, {jl_clk_g, jl_j_g, jl_k_g, jl_q}, rj));
      if (dl_clk) n_dl_open++; else n_dl_hold++;
      if (tl_clk && tl_t) n_tl_toggle++; else n_tl_hold++;
      if (jl_clk) n_jl[3'({jl_j, jl_k})]++; else n_jl[4]++;

      // flip-flops against their behaviour tables
      if (c_dff && !dff_clk) begin r_dff = p_dff; n_dff_cap[p_dff]++; end
      if (c_tff && !tff_clk) begin
        if (p_tff != r_tff) n_tff_toggle++; else n_tff_keep++;
        r_tff = p_tff;
      end
      if (c_jkff && !jkff_clk) begin r_jkff = p_jkff; n_jkff[p_jkmode]++; end
      check(dff_q == r_dff,   $sformatf("step %0d D FF q=%b want %b", n, dff_q, r_dff));
      check(tff_q == r_tff,   $sformatf("step %0d T FF q=%b want %b", n, tff_q, r_tff));
      check(jkff_q == r_jkff, $sformatf("step %0d JK FF q=%b want %b", n, jkff_q, r_jkff));
      check({dff_clk_g, tff_clk_g, jkff_clk_g} == ~{dff_clk, tff_clk, jkff_clk},
            $sformatf("step %0d flip-flop clk' outputs", n));
      check(tff_t_g == tff_t, $sformatf("step %0d T FF T'", n));
      if (dff_clk) begin
        p_dff = dff_d;
        check(dff_ds_g == p_dff, $sformatf("step %0d D FF slave D'", n));
      end else begin
        check(dff_dm_g == dff_d, $sformatf("step %0d D FF master D'", n));
      end
      if (tff_clk) begin
        p_tff = r_tff ^ tff_t;
        check(tff_ds_g == p_tff, $sformatf("step %0d T FF slave D'", n));
      end
      if (jkff_clk) begin
        p_jkff   = jk_next(jkff_j, jkff_k, r_jkff);
        p_jkmode = {jkff_j, jkff_k};
        check(jkff_ds_g == p_jkff, $sformatf("step %0d JK FF slave D'", n));
      end else begin
        check(jkff_j_g == jkff_j && jkff_k_g == jkff_k, $sformatf("step %0d JK FF J'/K'", n));
      end
      c_dff = dff_clk; c_tff = tff_clk; c_jkff = jkff_clk;

      @(posedge tick);
      r_dl = rd[0];
      r_tl = rt[0];
      r_jl = rj[0];
    end

    $display("D latch: transparent %0d, opaque %0d", n_dl_open, n_dl_hold);
    $display("T latch: toggle %0d, hold %0d", n_tl_toggle, n_tl_hold);
    $display("JK latch: clk=1 JK=00 %0d, 01 %0d, 10 %0d, 11 %0d; clk=0 %0d",
             n_jl[0], n_jl[1], n_jl[2], n_jl[3], n_jl[4]);
    $display("D FF: captured 0 %0d, captured 1 %0d", n_dff_cap[0], n_dff_cap[1]);
    $display("T FF: toggled %0d, kept %0d", n_tff_toggle, n_tff_keep);
    $display("JK FF: JK=00 %0d, 01 %0d, 10 %0d, 11 %0d", n_jkff[0], n_jkff[1], n_jkff[2], n_jkff[3]);
    $display("asynchronous resets: %0d", n_reset);
    check(n_dl_open > 0 && n_dl_hold > 0, "D latch transparent and opaque");
    check(n_tl_toggle > 0 && n_tl_hold > 0, "T latch toggle and hold");
    for (int i = 0; i < 5; i++) check(n_jl[i] > 0, $sformatf("JK latch mode %0d", i));
    check(n_dff_cap[0] > 0 && n_dff_cap[1] > 0, "D FF captures 0 and 1");
    check(n_tff_toggle > 0 && n_tff_keep > 0, "T FF toggle and keep");
    for (int i = 0; i < 4; i++) check(n_jkff[i] > 0, $sformatf("JK FF mode %0d", i));
    check(n_reset > 0, "reset exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge tick);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
