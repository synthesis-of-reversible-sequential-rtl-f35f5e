// tb_rev_jk_latch: checks the reversible JK latch against its augmented truth
// table (rows {clk,J,K,Q_n} -> {clk',J',K',Q_{n+1}}) over a random sequence of
// steps, and checks that the table is a permutation of the 16 patterns.
//
// Each step: inputs change after the falling edge of tick; one time unit later
// all four outputs are compared with the row selected by the reference state;
// at the rising edge of tick the reference state takes the row's Q_{n+1}.
// Independently, q is compared with the JK rule: hold while clk=0; while clk=1
// hold (00), reset (01), set (10), toggle (11).
module tb_rev_jk_latch;
  int checks = 0, failures = 0;
  int n_mode [4];
  int n_hold = 0;

  localparam logic [3:0] JKTABLE [16] = '{
    4'b0000, 4'b0001, 4'b0010, 4'b0011, 4'b0100, 4'b0101, 4'b0110, 4'b0111,
    4'b1000, 4'b1001, 4'b1010, 4'b1110, 4'b1101, 4'b1011, 4'b1111, 4'b1100 };

  logic tick = 1'b0, rst_n = 1'b0, clk = 1'b0, j = 1'b0, k = 1'b0;
  logic clk_g, j_g, k_g, q;
  logic ref_q = 1'b0;

  rev_jk_latch dut (.tick, .rst_n, .clk, .j, .k, .clk_g, .j_g, .k_g, .q);

  always #5 tick = ~tick;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic logic jk_rule(logic c, logic jj, logic kk, logic qn);
    if (!c) return qn;
    case ({jj, kk})
      2'b00:   return qn;
      2'b01:   return 1'b0;
      2'b10:   return 1'b1;
      default: return ~qn;
    endcase
  endfunction

  initial begin
    logic [3:0] row;
    bit seen [16];
    for (int i = 0; i < 16; i++) begin
      check(!seen[JKTABLE[i]], $sformatf("table output %b repeated", JKTABLE[i]));
      seen[JKTABLE[i]] = 1'b1;
    end
    repeat (2) @(posedge tick);
    @(negedge tick);
    rst_n = 1'b1;
    for (int n = 0; n < 600; n++) begin
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
      j   = 1'($urandom_range(0, 1));
      k   = 1'($urandom_range(0, 1));
      #1;
      row = JKTABLE[{clk, j, k, ref_q}];
      check({clk_g, j_g, k_g, q} == row,
            $sformatf("step %0d in=%b got %b want %b", n, {clk, j, k, ref_q}, {clk_g, j_g, k_g, q}, row));
      check(q == jk_rule(clk, j, k, ref_q), $sformatf("step %0d JK rule", n));
      if (clk) n_mode[{j, k}]++; else n_hold++;
      @(posedge tick);
      ref_q = row[0];
    end
    check(n_hold > 0 && n_mode[0] > 0 && n_mode[1] > 0 && n_mode[2] > 0 && n_mode[3] > 0,
          "every JK mode exercised");
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
