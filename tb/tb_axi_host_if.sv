// tb_axi_host_if: AXI4-Lite transactions against a small register file behind the bus.
//
// Writes are issued with the address first, the data first, and both together, with the
// master sometimes slow to take the response; each must produce exactly one bus_we with
// its own address and data and one OKAY response.  Reads, with a slow R ready now and
// then, must return the register file's contents (the register file answers one cycle
// after bus_re, as the bus requires).
module tb_axi_host_if;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        s_awvalid = 0, s_wvalid = 0, s_bready = 0, s_arvalid = 0, s_rready = 0;
  logic [11:0] s_awaddr = '0, s_araddr = '0;
  logic [31:0] s_wdata = '0;
  logic [3:0]  s_wstrb = '0;
  logic        s_awready, s_wready, s_bvalid, s_arready, s_rvalid;
  logic [1:0]  s_bresp, s_rresp;
  logic [31:0] s_rdata;
  logic        bus_we, bus_re;
  logic [11:0] bus_waddr, bus_raddr;
  logic [31:0] bus_wdata, bus_rdata;
  logic [3:0]  bus_wstrb;

  axi_host_if #(.ADDR_W(12)) dut (.*);

  logic [31:0] regs [1024];
  int          n_we = 0;
  int checks = 0, failures = 0;
  always_ff @(posedge clk) begin
    if (bus_we) begin
      regs[bus_waddr[11:2]] <= bus_wdata;
      n_we <= n_we + 1;
    end
    if (bus_re) bus_rdata <= regs[bus_raddr[11:2]];
  end

  task automatic axi_write(input logic [11:0] a, input logic [31:0] d, input int mode);
    int n_we0 = n_we;
    logic aw_hs, w_hs;
    @(negedge clk);
    if (mode != 1) begin s_awvalid = 1; s_awaddr = a; end
    if (mode != 0) begin s_wvalid = 1; s_wdata = d; s_wstrb = 4'hf; end
    if (mode == 0) begin
      while (!s_awready) @(negedge clk);
      @(negedge clk); s_awvalid = 0; s_wvalid = 1; s_wdata = d; s_wstrb = 4'hf;
    end else if (mode == 1) begin
      while (!s_wready) @(negedge clk);
      @(negedge clk); s_wvalid = 0; s_awvalid = 1; s_awaddr = a;
    end
    // drop each valid after its handshake
    while (s_awvalid || s_wvalid) begin
      aw_hs = s_awvalid && s_awready;
      w_hs  = s_wvalid && s_wready;
      @(posedge clk);
      #1;
      if (aw_hs) s_awvalid = 0;
      if (w_hs)  s_wvalid = 0;
    end
    repeat ($urandom_range(0, 3)) @(negedge clk);
    s_bready = 1;
    while (!s_bvalid) @(negedge clk);
    @(posedge clk); #1 s_bready = 0;
    checks++;
    if (n_we != n_we0 + 1 || regs[a[11:2]] !== d || s_bresp !== 2'b00) begin
      failures++;
      $display("write %h=%h mode %0d: %0d bus writes, reg %h", a, d, mode, n_we - n_we0,
               regs[a[11:2]]);
    end
  endtask

  task automatic axi_read(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk);
    s_arvalid = 1; s_araddr = a;
    while (!s_arready) @(negedge clk);
    @(posedge clk); #1 s_arvalid = 0;
    repeat ($urandom_range(0, 4)) @(negedge clk);
    s_rready = 1;
    while (!s_rvalid) @(negedge clk);
    d = s_rdata;
    @(posedge clk); #1 s_rready = 0;
  endtask

  initial begin
    logic [31:0] model [64];
    logic [31:0] d;
    logic [11:0] a;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 64; k++) begin
      a = 12'(4 * k);
      model[k] = $urandom;
      axi_write(a, model[k], k % 3);
    end
    for (int k = 0; k < 64; k++) begin
      axi_read(12'(4 * k), d);
      checks++;
      if (d !== model[k] || s_rresp !== 2'b00) begin
        failures++;
        $display("read %0d: %h expected %h", k, d, model[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
