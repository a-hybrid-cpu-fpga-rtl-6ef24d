// tb_sha256crypt_accel: end-to-end test of the accelerator through its AXI4-Lite port,
// at a reduced group size (G = 8) with both cores running at once.
//
// The host model (accel_driver) loads both cores, runs them with N = 50 and N = 51
// iterations, and checks all 16 results against the sha256crypt model.  The testbench
// also counts, in core 0, how often each mechanism of the design happens and fails if one
// never does: group-scheduled rounds (G blocks in consecutive cycles), rounds started from
// the IV, intermediate states kept in the state buffer, look-ahead DS selections, TP
// write-backs, DC written alternately to DA and to DB, end-of-loop5 flags, wraps of the
// 42 loop5 state groups, and cycles in which both cores are busy.  Every round must last
// G + 64 cycles.
module tb_sha256crypt_accel;
  import sc_pkg::*;
  localparam int G = 8, LP = 6, LS = 8, NC = 2;
  localparam int IW = 8, ADDR_W = 8 + IW + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              s_awvalid, s_awready, s_wvalid, s_wready, s_bvalid, s_bready;
  logic              s_arvalid, s_arready, s_rvalid, s_rready;
  logic [ADDR_W-1:0] s_awaddr, s_araddr;
  logic [31:0]       s_wdata, s_rdata;
  logic [3:0]        s_wstrb;
  logic [1:0]        s_bresp, s_rresp;
  logic [NC-1:0]     core_done;
  logic              finished;
  int                d_checks, d_failures;
  longint            run_cycles;

  sha256crypt_accel #(.NUM_CORES(NC), .LP(LP), .LS(LS), .G(G)) dut (.*);
  accel_driver #(.NUM_CORES(NC), .LP(LP), .LS(LS), .G(G), .N_ITER(50), .ADDR_W(ADDR_W),
                 .IW(IW)) drv (.*);

  // mechanism counters, core 0
  int n_group = 0, n_iv = 0, n_state = 0, n_lae = 0, n_tp = 0, n_dc_da = 0, n_dc_db = 0;
  int n_eol = 0, n_wrap = 0, n_both = 0, n_bad_round = 0, burst = 0;
  longint round_start = -1, cyc = 0;
  localparam int NST = num_states(LP, LS);

  always @(posedge clk) begin
    cyc++;
    if (dut.g_core[0].u_core.issue_v_q) begin
      burst++;
      if (dut.g_core[0].u_core.f_first && burst == 1) n_iv++;
    end else begin
      if (burst == G) n_group++;
      burst = 0;
    end
    if (dut.g_core[0].u_core.issue && int'(dut.g_core[0].u_core.cyc_q) == 0) begin
      if (round_start >= 0 && cyc - round_start != G + 64) n_bad_round++;
      round_start = cyc;
    end
    if (!dut.g_core[0].u_core.busy) round_start = -1;
    if (dut.g_core[0].u_core.wb_valid) begin
      if (!dut.g_core[0].u_core.wb_tag.last) n_state++;
      else if (dut.g_core[0].u_core.wb_tag.dest == DEST_TP) n_tp++;
      else if (dut.g_core[0].u_core.u_fsm.state >= sg5_first(LP, LS) ||
               dut.g_core[0].u_core.u_fsm.at_end) begin
        if (dut.g_core[0].u_core.wb_tag.dest == DEST_DA) n_dc_da++;
        if (dut.g_core[0].u_core.wb_tag.dest == DEST_DB) n_dc_db++;
      end
    end
    if (dut.g_core[0].u_core.ds_valid) n_lae++;
    if (dut.g_core[0].u_core.step && dut.g_core[0].u_core.f_eol) n_eol++;
    if (dut.g_core[0].u_core.step && int'(dut.g_core[0].u_core.u_fsm.state) == NST - 1) n_wrap++;
    if (&{dut.g_core[0].u_core.busy, dut.g_core[1].u_core.busy}) n_both++;
  end

  function automatic int need(input string name, input int n);
    $display("  %-34s %0d", name, n);
    return (n > 0) ? 0 : 1;
  endfunction

  initial begin
    int failures, checks;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    wait (finished);
    checks = d_checks;
    failures = d_failures;
    $display("run: %0d cycles for both cores", run_cycles);
    $display("mechanisms seen in core 0:");
    failures += need("group-scheduled rounds", n_group);
    failures += need("rounds started from the IV", n_iv);
    failures += need("state buffer writes", n_state);
    failures += need("look-ahead DS selections", n_lae);
    failures += need("TP write-backs", n_tp);
    failures += need("DC written to DA", n_dc_da);
    failures += need("DC written to DB", n_dc_db);
    failures += need("end-of-loop5 steps", n_eol);
    failures += need("loop5 state-group wraps", n_wrap);
    failures += need("cycles with both cores busy", n_both);
    checks += 10;
    checks++;
    if (n_bad_round != 0 || n_eol != 50) begin
      failures++;
      $display("%0d rounds not G+64 cycles long; %0d iterations (expected 50)", n_bad_round,
               n_eol);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (400_000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", d_checks + 1, d_failures + 1);
    $finish;
  end
endmodule
