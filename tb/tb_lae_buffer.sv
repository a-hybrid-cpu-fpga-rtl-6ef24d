// tb_lae_buffer: fills the 256 rows with distinct digests, then presents 300 DB digests
// with random first bytes (some back to back) and checks that one cycle later the row
// selected by DB[0] comes out with the same password index and a valid strobe.
module tb_lae_buffer;
  import sc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        host_we = 1'b0;
  logic [7:0]  host_addr = '0;
  logic [31:0] host_be = '0;
  digest_t     host_data = '0;
  logic        db_valid = 1'b0;
  digest_t     db = '0;
  logic [10:0] db_idx = '0;
  logic        ds_valid;
  digest_t     ds;
  logic [10:0] ds_idx;
  digest_t     rows [256];
  int checks = 0, failures = 0;

  lae_buffer #(.IDX_W(11)) dut (.*);

  initial begin
    digest_t     exp_ds;
    logic [10:0] exp_idx;
    logic        exp_v;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 256; k++) begin
      @(negedge clk);
      host_we = 1'b1; host_addr = 8'(k); host_be = '1;
      for (int b = 0; b < 32; b++) host_data[b] = 8'($urandom);
      rows[k] = host_data;
    end
    @(negedge clk);
    host_we = 1'b0;
    for (int n = 0; n < 300; n++) begin
      exp_v = 1'($urandom_range(0, 3) != 0);
      db_valid = exp_v;
      for (int b = 0; b < 32; b++) db[b] = 8'($urandom);
      db_idx = 11'($urandom);
      exp_ds = rows[db[0]];
      exp_idx = db_idx;
      @(negedge clk);
      checks++;
      if (ds_valid !== exp_v || (exp_v && (ds !== exp_ds || ds_idx !== exp_idx))) begin
        failures++;
        $display("n=%0d: valid %0d ds %h idx %0d, expected %0d %h %0d", n, ds_valid, ds,
                 ds_idx, exp_v, exp_ds, exp_idx);
      end
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
