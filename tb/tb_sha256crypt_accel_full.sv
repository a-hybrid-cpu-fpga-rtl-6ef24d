// tb_sha256crypt_accel_full: one complete operation of the accelerator at its default
// parameters (two cores, LP = 6, LS = 8, G = 2048 passwords per core).
//
// The host model loads 2 x 2048 random passwords, runs the cores with N = 5000 (the
// sha256crypt default) and 5001 iterations, and checks all 4096 results.  A run is
// 1 + 2 + 1 + N rounds of G + 64 = 2112 cycles, i.e. 10.57 M cycles (48 ms at 220 MHz)
// for N = 5000; the check allows for the host's status polling.  The simulation
// takes about 3 minutes.
module tb_sha256crypt_accel_full;
  localparam int G = 2048, IW = 11, ADDR_W = 8 + IW + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              s_awvalid, s_awready, s_wvalid, s_wready, s_bvalid, s_bready;
  logic              s_arvalid, s_arready, s_rvalid, s_rready;
  logic [ADDR_W-1:0] s_awaddr, s_araddr;
  logic [31:0]       s_wdata, s_rdata;
  logic [3:0]        s_wstrb;
  logic [1:0]        s_bresp, s_rresp;
  logic [1:0]        core_done;
  logic              finished;
  int                d_checks, d_failures;
  longint            run_cycles;

  sha256crypt_accel dut (.*);
  accel_driver #(.NUM_CORES(2), .LP(6), .LS(8), .G(G), .N_ITER(5000), .ADDR_W(ADDR_W),
                 .IW(IW)) drv (.*);

  initial begin
    int checks, failures;
    longint lo, hi;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    wait (finished);
    checks = d_checks + 1;
    failures = d_failures;
    // core 1 runs 5001 iterations: 5005 rounds; status is polled every ~200 cycles
    lo = 5005 * (G + 64);
    hi = lo + 400;
    if (run_cycles < lo || run_cycles > hi) begin
      failures++;
      $display("run took %0d cycles, expected %0d..%0d", run_cycles, lo, hi);
    end else
      $display("run took %0d cycles (5005 rounds x %0d = %0d)", run_cycles, G + 64, lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (12_000_000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", d_checks + 1, d_failures + 1);
    $finish;
  end
endmodule
