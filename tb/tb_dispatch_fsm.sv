// tb_dispatch_fsm: walks the look-up-table FSM of the default specialisation (LP = 6,
// LS = 8) through complete runs and checks every state it visits.
//
// For N = 1, 2, 43 and 100 iterations the FSM is started and stepped once per round.  The
// rounds must follow the loops in order (loop1: 1 round, loop2: 2, loop3: 1, then one
// round per loop5 iteration for this length), with FIRST on the first round of each loop,
// LAST on the last, the write-back buffer of each loop (DA, DB + LAE, TP, then DC
// alternating DA/DB with the iteration parity), EOL on each loop5 state group, the
// iteration counter counting the finished iterations, and S_E reached after exactly
// 4 + N rounds (the document's 5,004 blocks for N = 5000).  It also checks that start
// restarts a run and that step is ignored in S_E.  The state counts of the other password
// lengths are compared with counts derived independently from the message lengths.
module tb_dispatch_fsm;
  import sc_pkg::*;
  import sc_ref_pkg::*;

  localparam int LP = 6, LS = 8;
  localparam int CSW = cs_width(LP, LS);
  localparam int NSTAT = num_states(LP, LS);
  localparam int SW = $clog2(NSTAT + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic        start = 1'b0, step = 1'b0;
  logic [31:0] n_iter = 32'd1;
  logic [BLOCK_BYTES-1:0][CSW-1:0] cs;
  logic        first, last, eol, at_end;
  dest_e       dest;
  logic [SW-1:0] state;
  logic [31:0] ic;
  int checks = 0, failures = 0;

  dispatch_fsm #(.LP(LP), .LS(LS)) dut (.*);

  task automatic expect_round(input string what, input logic f, input logic l,
                              input dest_e d, input logic e, input int icv);
    checks++;
    if (at_end || first !== f || last !== l || (l && dest !== d) || eol !== e ||
        ic !== 32'(icv)) begin
      failures++;
      $display("%s: at_end=%0d first=%0d last=%0d dest=%0d eol=%0d ic=%0d, expected %0d %0d %0d %0d %0d",
               what, at_end, first, last, dest, eol, ic, f, l, d, e, icv);
    end
  endtask

  task automatic do_step();
    @(negedge clk); step = 1'b1;
    @(negedge clk); step = 1'b0;
  endtask

  task automatic run(input int n);
    int lb;
    int nb;
    @(negedge clk);
    n_iter = 32'(n);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    expect_round("loop1", 1, 1, DEST_DA, 0, 0);
    do_step();
    expect_round("loop2 r0", 1, 0, DEST_DB_LAE, 0, 0);
    do_step();
    expect_round("loop2 r1", 0, 1, DEST_DB_LAE, 0, 0);
    do_step();
    expect_round("loop3", 1, 1, DEST_TP, 0, 0);
    for (int i = 0; i < n; i++) begin
      do_step();
      expect_round($sformatf("loop5 i=%0d", i), 1, 1, (i % 2 == 0) ? DEST_DA : DEST_DB, 1, i);
    end
    do_step();
    checks++;
    if (!at_end || ic !== 32'(n)) begin
      failures++;
      $display("N=%0d: not in S_E after %0d rounds (ic=%0d)", n, 4 + n, ic);
    end
    do_step();
    checks++;
    if (!at_end || ic !== 32'(n)) begin
      failures++;
      $display("N=%0d: left S_E", n);
    end
  endtask

  initial begin
    int lb, cnt;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (!at_end) begin failures++; $display("not in S_E after reset"); end
    run(1);
    run(2);
    run(43);
    run(100);
    // state counts for the other lengths, from the message lengths alone
    for (int lp = 6; lp <= 16; lp++) begin
      lb = 2 * lp + LS;
      for (int n = lp; n > 0; n = n >> 1) lb += ((n & 1) != 0) ? 32 : lp;
      cnt = nblocks(2 * lp + LS) + nblocks(lb) + nblocks(lp * lp);
      for (int i = 0; i < 42; i++)
        cnt += nblocks(((i % 2 != 0) ? lp : 32) + ((i % 3 != 0) ? LS : 0) +
                       ((i % 7 != 0) ? lp : 0) + ((i % 2 != 0) ? 32 : lp));
      checks++;
      if (num_states(lp, LS) != cnt) begin
        failures++;
        $display("LP=%0d: %0d states, expected %0d", lp, num_states(lp, LS), cnt);
      end else
        $display("LP=%0d LS=8: %0d states plus S_E", lp, cnt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
