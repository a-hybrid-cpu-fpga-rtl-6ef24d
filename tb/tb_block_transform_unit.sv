// tb_block_transform_unit: checks the pipelined SHA-256 block transform.
//
// 1. The one-block message "abc" from the IV must give the FIPS 180-4 digest
//    ba7816bf...f20015ad, exactly 64 cycles after it enters.
// 2. 200 random blocks with random input states are fed back to back, one per cycle,
//    with gaps now and then; every digest is compared with the software compression
//    function of sc_ref_pkg, must carry its own tag, and must appear 64 cycles after its
//    block (a throughput of one block per cycle).
module tb_block_transform_unit;
  import sc_pkg::*;
  import sc_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        in_valid = 1'b0;
  block_t      in_block = '0;
  hstate_t     in_state = '0;
  logic [15:0] in_tag = '0;
  logic        out_valid, busy;
  digest_t     out_digest;
  logic [15:0] out_tag;

  block_transform_unit #(.TAG_W(16)) dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle++;

  // expected results, indexed by tag
  digest_t exp_dig [256];
  longint  in_cycle [256];
  int      n_out = 0;

  function automatic digest_t ref_btf(input block_t b, input hstate_t s);
    logic [31:0] h [8];
    bytes_t      m;
    digest_t     d;
    for (int i = 0; i < 8; i++) h[i] = s[i];
    for (int i = 0; i < 64; i++) m.push_back(b[i]);
    compress(h, m, 0);
    for (int i = 0; i < 8; i++)
      for (int k = 0; k < 4; k++) d[4*i+k] = h[i][31-8*k -: 8];
    return d;
  endfunction

  always @(negedge clk) begin
    if (out_valid) begin
      checks++;
      n_out++;
      if (out_digest != exp_dig[out_tag[7:0]]) begin
        failures++;
        $display("tag %0d: digest %h expected %h", out_tag, out_digest, exp_dig[out_tag[7:0]]);
      end
      checks++;
      if (cycle - in_cycle[out_tag[7:0]] != 64) begin
        failures++;
        $display("tag %0d: latency %0d", out_tag, cycle - in_cycle[out_tag[7:0]]);
      end
    end
  end

  initial begin
    block_t abc = '0;
    digest_t d_abc;
    logic [255:0] abc_h;
    int t;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // "abc"
    abc[0] = 8'h61; abc[1] = 8'h62; abc[2] = 8'h63; abc[3] = 8'h80; abc[63] = 8'h18;
    abc_h = 256'hba7816bf8f01cfea414140de5dae2223b00361a396177a9cb410ff61f20015ad;
    for (int i = 0; i < 32; i++) d_abc[i] = abc_h[255-8*i -: 8];
    exp_dig[0] = d_abc;
    @(negedge clk);
    in_valid = 1'b1; in_block = abc; in_state = SHA256_IV; in_tag = 16'd0;
    in_cycle[0] = cycle;
    @(negedge clk);
    in_valid = 1'b0;
    repeat (70) @(negedge clk);
    // random stream
    t = 1;
    while (t < 201) begin
      if ($urandom_range(0, 9) != 0) begin
        in_valid = 1'b1;
        for (int i = 0; i < 64; i++) in_block[i] = 8'($urandom);
        for (int i = 0; i < 8; i++) in_state[i] = $urandom;
        in_tag = 16'(t);
        exp_dig[t] = ref_btf(in_block, in_state);
        in_cycle[t] = cycle;
        t++;
      end else begin
        in_valid = 1'b0;
      end
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (70) @(negedge clk);
    checks++;
    if (n_out != 201 || busy) begin
      failures++;
      $display("%0d digests seen, expected 201; busy=%0d", n_out, busy);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
