// tb_accel_core: self-checking test of one accelerating core.
//
// Two cores run side by side.  The first uses the default specialisation (LP = 6, LS = 8)
// with a group of 8 random passwords and 50 iterations, enough to wrap the 42 loop5 state
// groups.  The second is specialised for LP = 12, LS = 10 and hashes "Hello world!" with
// salt "saltstring" over the standard 5000 iterations; its result must encode to the
// well-known hash 5B8vYYiY.CVt1RlTTf8KbXBH3hsxY/GNooZaBBGWEc5.  Every DC and both run
// times are checked (see core_harness).
module tb_accel_core;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic fin_a, fin_b;
  int   chk_a, chk_b, fail_a, fail_b;
  int   checks, failures;

  core_harness #(.LP(6), .LS(8), .G(8), .N_ITER(50)) u_a (
    .clk, .rst_n, .finished(fin_a), .checks(chk_a), .failures(fail_a));
  core_harness #(.LP(12), .LS(10), .G(4), .N_ITER(5000), .PWD0("Hello world!"),
                 .SALT("saltstring"), .EXPECT("5B8vYYiY.CVt1RlTTf8KbXBH3hsxY/GNooZaBBGWEc5")) u_b (
    .clk, .rst_n, .finished(fin_b), .checks(chk_b), .failures(fail_b));

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    wait (fin_a && fin_b);
    checks   = chk_a + chk_b;
    failures = fail_a + fail_b;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", chk_a + chk_b + 1, fail_a + fail_b + 1);
    $finish;
  end
endmodule
