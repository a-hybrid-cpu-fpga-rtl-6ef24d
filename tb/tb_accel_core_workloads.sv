// tb_accel_core_workloads: the four password/salt length configurations of the published
// comparison (LP = 8 and 16 bytes, LS = 8 and 16 bytes), each with the standard 5000
// iterations.
//
// One accelerating core per configuration, each specialised for its lengths and given a
// group of 4 random passwords (the group size only changes the run time, not the path a
// password takes).  Every DC is checked against the sha256crypt model and every run time
// against rounds x (G + 64) + 3 cycles (see core_harness).  The round counts are also
// compared with the published block counts per password: those include the loop4 blocks
// that this design leaves to the host, on average 19 for an 8-byte salt (3 to 35 blocks)
// and 37 for a 16-byte salt (5 to 68 blocks), so published = rounds + that average.
module tb_accel_core_workloads;
  import sc_ref_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NW = 4;
  logic [NW-1:0] fin;
  int            chk [NW], fail [NW];

  core_harness #(.LP(8),  .LS(8),  .G(4), .N_ITER(5000), .SALT("s8a8l8t8")) u_8_8 (
    .clk, .rst_n, .finished(fin[0]), .checks(chk[0]), .failures(fail[0]));
  core_harness #(.LP(16), .LS(8),  .G(4), .N_ITER(5000), .SALT("8salt8b8")) u_16_8 (
    .clk, .rst_n, .finished(fin[1]), .checks(chk[1]), .failures(fail[1]));
  core_harness #(.LP(8),  .LS(16), .G(4), .N_ITER(5000), .SALT("sixteen.bytesalt")) u_8_16 (
    .clk, .rst_n, .finished(fin[2]), .checks(chk[2]), .failures(fail[2]));
  core_harness #(.LP(16), .LS(16), .G(4), .N_ITER(5000), .SALT("SALT/of/16/bytes")) u_16_16 (
    .clk, .rst_n, .finished(fin[3]), .checks(chk[3]), .failures(fail[3]));

  // published blocks per password for (LP, LS)
  int cfg [NW][3] = '{'{8, 8, 7881}, '{16, 8, 9789}, '{8, 16, 8375}, '{16, 16, 9807}};

  initial begin
    int checks, failures, r, cpu;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    wait (&fin);
    checks = 0;
    failures = 0;
    for (int w = 0; w < NW; w++) begin
      checks += chk[w];
      failures += fail[w];
      r = rounds_fpga(cfg[w][0], cfg[w][1], 5000);
      cpu = (cfg[w][1] == 8) ? 19 : 37;
      checks++;
      if (r + cpu != cfg[w][2]) failures++;
      $display("LP=%0d LS=%0d: %0d rounds on the core + %0d host blocks = %0d (published %0d)",
               cfg[w][0], cfg[w][1], r, cpu, r + cpu, cfg[w][2]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (1_500_000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1] + chk[2] + chk[3] + 1,
             fail[0] + fail[1] + fail[2] + fail[3] + 1);
    $finish;
  end
endmodule
