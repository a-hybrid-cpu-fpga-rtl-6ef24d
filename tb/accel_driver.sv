// accel_driver: host model for the sha256crypt_accel testbenches.
//
// Acts as the CPU side of the AXI4-Lite port: for each core it writes the salt, the 256
// look-ahead DS digests (computed here, as the host software would), G random printable
// passwords and the iteration count N_ITER + c (so the cores run different counts and
// both result buffers are used), starts all cores, polls their status until every core is
// done, reads back all G results of each core and compares them with the sha256crypt
// model.  The cycles from the first start to the last done are reported in run_cycles.
module accel_driver
  import sc_ref_pkg::*;
#(
  parameter int NUM_CORES = 2,
  parameter int LP        = 6,
  parameter int LS        = 8,
  parameter int G         = 8,
  parameter int N_ITER    = 50,
  parameter int ADDR_W    = 20,
  parameter int IW        = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              s_awvalid,
  input  logic              s_awready,
  output logic [ADDR_W-1:0] s_awaddr,
  output logic              s_wvalid,
  input  logic              s_wready,
  output logic [31:0]       s_wdata,
  output logic [3:0]        s_wstrb,
  input  logic              s_bvalid,
  output logic              s_bready,
  output logic              s_arvalid,
  input  logic              s_arready,
  output logic [ADDR_W-1:0] s_araddr,
  input  logic              s_rvalid,
  output logic              s_rready,
  input  logic [31:0]       s_rdata,
  output logic              finished,
  output int                d_checks,
  output int                d_failures,
  output longint            run_cycles
);

  function automatic logic [ADDR_W-1:0] addr(input int core, input int region, input int idx,
                                             input int word);
    longint a = (longint'(core) << (8 + IW)) | (longint'(region) << (5 + IW)) |
                (longint'(idx) << 5) | (longint'(word) << 2);
    return ADDR_W'(a);
  endfunction

  task automatic wr(input logic [ADDR_W-1:0] a, input logic [31:0] d);
    @(negedge clk);
    s_awvalid = 1'b1; s_awaddr = a; s_wvalid = 1'b1; s_wdata = d; s_wstrb = 4'hf;
    s_bready = 1'b1;
    @(posedge clk);
    while (!(s_awready && s_wready)) @(posedge clk);
    #1 s_awvalid = 1'b0; s_wvalid = 1'b0;
    while (!s_bvalid) @(posedge clk);
    @(posedge clk);
    #1 s_bready = 1'b0;
  endtask

  task automatic rd(input logic [ADDR_W-1:0] a, output logic [31:0] d);
    @(negedge clk);
    s_arvalid = 1'b1; s_araddr = a; s_rready = 1'b1;
    @(posedge clk);
    while (!s_arready) @(posedge clk);
    #1 s_arvalid = 1'b0;
    while (!s_rvalid) @(posedge clk);
    d = s_rdata;
    @(posedge clk);
    #1 s_rready = 1'b0;
  endtask

  task automatic wr_bytes(input int core, input int region, input int idx, input bytes_t v);
    logic [31:0] d;
    for (int w = 0; w < (v.size() + 3) / 4; w++) begin
      d = '0;
      for (int b = 0; b < 4; b++) if (4 * w + b < v.size()) d[8*b +: 8] = v[4*w+b];
      wr(addr(core, region, idx, w), d);
    end
  endtask

  bytes_t pwds [NUM_CORES][G];
  bytes_t salt;
  bytes_t lae [256];
  longint cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    logic [31:0] d;
    dig_t        got, exp_dc;
    logic [NUM_CORES-1:0] fin;
    longint      t0;
    s_awvalid = 0; s_wvalid = 0; s_bready = 0; s_arvalid = 0; s_rready = 0;
    s_awaddr = '0; s_araddr = '0; s_wdata = '0; s_wstrb = '0;
    finished = 0; d_checks = 0; d_failures = 0; run_cycles = 0;
    for (int k = 0; k < LS; k++) salt.push_back(byte'(97 + $urandom_range(0, 25)));
    for (int k = 0; k < 256; k++) lae[k] = dig_bytes(ds_of(salt, k), 32);
    @(posedge rst_n);
    for (int c = 0; c < NUM_CORES; c++) begin
      wr_bytes(c, 1, 0, salt);
      for (int k = 0; k < 256; k++) wr_bytes(c, 3, k, lae[k]);
      for (int g = 0; g < G; g++) begin
        for (int i = 0; i < LP; i++) pwds[c][g].push_back(byte'(33 + $urandom_range(0, 93)));
        wr_bytes(c, 2, g, pwds[c][g]);
      end
      wr(addr(c, 0, 0, 1), 32'(N_ITER + c));
      rd(addr(c, 0, 0, 1), d);
      d_checks++;
      if (d != 32'(N_ITER + c)) begin d_failures++; $display("core %0d: N reads %0d", c, d); end
    end
    t0 = cyc;
    for (int c = 0; c < NUM_CORES; c++) wr(addr(c, 0, 0, 0), 32'd1);
    fin = '0;
    while (fin != '1) begin
      for (int c = 0; c < NUM_CORES; c++) begin
        rd(addr(c, 0, 0, 0), d);
        if (d[1]) fin[c] = 1'b1;
      end
      repeat (200) @(posedge clk);
    end
    run_cycles = cyc - t0;
    for (int c = 0; c < NUM_CORES; c++)
      for (int g = 0; g < G; g++) begin
        exp_dc = crypt_dc(pwds[c][g], salt, N_ITER + c);
        for (int w = 0; w < 8; w++) begin
          rd(addr(c, 4, g, w), d);
          for (int b = 0; b < 4; b++) got[4*w+b] = d[8*b +: 8];
        end
        d_checks++;
        if (got != exp_dc) begin
          d_failures++;
          if (d_failures < 10) $display("core %0d password %0d: %h expected %h", c, g, got, exp_dc);
        end
      end
    finished = 1;
  end

endmodule
