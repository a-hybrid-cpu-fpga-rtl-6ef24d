// core_harness: drives one accel_core through a complete run and checks it.
//
// Loads the salt, the 256 look-ahead DS digests and G passwords (password 0 is PWD0 when
// given, the others random printable characters), starts the core with N_ITER
// iterations, measures the cycles from start to done and reads back every DC.  Each DC
// is compared with the software model in sc_ref_pkg; the run time must be exactly
// (rounds per password) x (G + 64) cycles plus the fixed 3-cycle drain of the core.  When
// EXPECT is not empty, the base64 form of password 0's result must equal it.
module core_harness
  import sc_pkg::*;
  import sc_ref_pkg::*;
#(
  parameter int    LP     = 6,
  parameter int    LS     = 8,
  parameter int    G      = 8,
  parameter int    N_ITER = 50,
  parameter string PWD0   = "",
  parameter string SALT   = "ssaalltt",
  parameter string EXPECT = ""
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);

  logic        start = 1'b0;
  logic        busy, done;
  logic        hw_en = 1'b0;
  host_tgt_e   hw_tgt = TGT_PWD;
  logic [15:0] hw_index = '0;
  logic [2:0]  hw_word = '0;
  logic [31:0] hw_data = '0;
  logic [15:0] hr_index = '0;
  logic [2:0]  hr_word = '0;
  logic [31:0] hr_data;

  accel_core #(.LP(LP), .LS(LS), .G(G)) dut (
    .clk, .rst_n, .start, .n_iter(32'(N_ITER)), .busy, .done,
    .hw_en, .hw_tgt, .hw_index, .hw_word, .hw_data, .hr_index, .hr_word, .hr_data);

  bytes_t pwds [G];
  bytes_t salt;

  task automatic write_bytes(input host_tgt_e t, input int idx, input bytes_t v);
    logic [31:0] d;
    int          nw = (v.size() + 3) / 4;
    int          w  = 0;
    while (w < nw) begin
      d = '0;
      for (int b = 0; b < 4; b++)
        if (4 * w + b < v.size()) d[8*b +: 8] = v[4*w+b];
      @(negedge clk);
      hw_en = 1'b1; hw_tgt = t; hw_index = 16'(idx); hw_word = 3'(w); hw_data = d;
      w++;
    end
    @(negedge clk);
    hw_en = 1'b0;
  endtask

  initial begin
    dig_t   exp_dc, got;
    longint cyc, exp_cyc;
    bytes_t row;
    finished = 1'b0;
    checks   = 0;
    failures = 0;
    salt = str_bytes(SALT);
    if (salt.size() != LS) begin
      $display("harness: salt length %0d does not match LS=%0d", salt.size(), LS);
      failures++;
    end
    for (int g = 0; g < G; g++) begin
      if (g == 0 && PWD0 != "") pwds[g] = str_bytes(PWD0);
      else for (int i = 0; i < LP; i++) pwds[g].push_back(byte'(33 + $urandom_range(0, 93)));
    end
    @(posedge rst_n);
    @(posedge clk);
    write_bytes(TGT_SALT, 0, salt);
    for (int k = 0; k < 256; k++) begin
      row = dig_bytes(ds_of(salt, k), 32);
      write_bytes(TGT_LAE, k, row);
    end
    for (int g = 0; g < G; g++) write_bytes(TGT_PWD, g, pwds[g]);

    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    exp_cyc = rounds_fpga(LP, LS, N_ITER) * (G + 64) + 3;
    checks++;
    if (cyc != exp_cyc) begin
      failures++;
      $display("LP=%0d: run took %0d cycles, expected %0d", LP, cyc, exp_cyc);
    end else
      $display("LP=%0d LS=%0d G=%0d N=%0d: %0d cycles = %0d rounds x (G+64) + 3", LP, LS, G,
               N_ITER, cyc, rounds_fpga(LP, LS, N_ITER));

    for (int g = 0; g < G; g++) begin
      exp_dc = crypt_dc(pwds[g], salt, N_ITER);
      for (int w = 0; w < 8; w++) begin
        hr_index = 16'(g); hr_word = 3'(w);
        @(negedge clk);
        for (int b = 0; b < 4; b++) got[4*w+b] = hr_data[8*b +: 8];
      end
      checks++;
      if (got != exp_dc) begin
        failures++;
        $display("LP=%0d password %0d: DC %h expected %h", LP, g, got, exp_dc);
      end
      if (g == 0 && EXPECT != "") begin
        checks++;
        if (crypt_b64(got) != EXPECT) begin
          failures++;
          $display("LP=%0d: hash %s expected %s", LP, crypt_b64(got), EXPECT);
        end else
          $display("LP=%0d: password 0 hashes to $5$%s$%s", LP, SALT, crypt_b64(got));
      end
    end
    finished = 1'b1;
  end

endmodule
