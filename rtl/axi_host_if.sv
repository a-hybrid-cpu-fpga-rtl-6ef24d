// axi_host_if: AXI4-Lite slave that connects the host CPU to the accelerating cores.
//
// It turns AXI4-Lite transactions into a plain register bus.  A write is accepted when both
// its address (AW) and data (W) have arrived, in either order; bus_we is then high for one
// cycle with bus_waddr/bus_wdata/bus_wstrb, and the OKAY response is raised on B.  A read
// (AR) drives bus_raddr from the next cycle on and pulses bus_re; the register behind the
// bus must present bus_rdata one cycle after bus_re, and it is returned on R.  One write
// and one read may be in flight at a time.  The document only states that the CPU and the
// cores are linked by AXI; the choice of AXI4-Lite, 32-bit data and this bus protocol is
// this design's own.
//
// rst_n is an asynchronous reset; the handshake assertions also use it in "disable iff",
// which lint reports as a synchronous use of the same net.  That is intended.
module axi_host_if #(
  parameter int ADDR_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  // AXI4-Lite slave
  input  logic              s_awvalid,
  output logic              s_awready,
  input  logic [ADDR_W-1:0] s_awaddr,
  input  logic              s_wvalid,
  output logic              s_wready,
  input  logic [31:0]       s_wdata,
  input  logic [3:0]        s_wstrb,
  output logic              s_bvalid,
  input  logic              s_bready,
  output logic [1:0]        s_bresp,
  input  logic              s_arvalid,
  output logic              s_arready,
  input  logic [ADDR_W-1:0] s_araddr,
  output logic              s_rvalid,
  input  logic              s_rready,
  output logic [31:0]       s_rdata,
  output logic [1:0]        s_rresp,
  // register bus
  output logic              bus_we,
  output logic [ADDR_W-1:0] bus_waddr,
  output logic [31:0]       bus_wdata,
  output logic [3:0]        bus_wstrb,
  output logic              bus_re,
  output logic [ADDR_W-1:0] bus_raddr,
  input  logic [31:0]       bus_rdata
);

  logic aw_have, w_have;
  logic r_busy, re_q, re_d;

  assign s_awready = !aw_have && !s_bvalid;
  assign s_wready  = !w_have && !s_bvalid;
  assign s_bresp   = 2'b00;
  assign s_rresp   = 2'b00;
  assign s_arready = !r_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aw_have   <= 1'b0;
      w_have    <= 1'b0;
      s_bvalid  <= 1'b0;
      bus_we    <= 1'b0;
      bus_waddr <= '0;
      bus_wdata <= '0;
      bus_wstrb <= '0;
    end else begin
      bus_we <= 1'b0;
      if (s_awvalid && s_awready) begin
        aw_have   <= 1'b1;
        bus_waddr <= s_awaddr;
      end
      if (s_wvalid && s_wready) begin
        w_have    <= 1'b1;
        bus_wdata <= s_wdata;
        bus_wstrb <= s_wstrb;
      end
      if (aw_have && w_have && !s_bvalid) begin
        bus_we   <= 1'b1;
        s_bvalid <= 1'b1;
        aw_have  <= 1'b0;
        w_have   <= 1'b0;
      end
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_busy    <= 1'b0;
      re_q      <= 1'b0;
      re_d      <= 1'b0;
      bus_raddr <= '0;
      s_rvalid  <= 1'b0;
      s_rdata   <= '0;
    end else begin
      re_q <= 1'b0;
      re_d <= re_q;
      if (s_arvalid && s_arready) begin
        r_busy    <= 1'b1;
        bus_raddr <= s_araddr;
        re_q      <= 1'b1;
      end
      if (re_d) begin
        s_rvalid <= 1'b1;
        s_rdata  <= bus_rdata;
      end
      if (s_rvalid && s_rready) begin
        s_rvalid <= 1'b0;
        r_busy   <= 1'b0;
      end
    end
  end

  assign bus_re = re_q;

  // AXI rule: a response, once valid, stays valid and stable until it is taken.
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_bvalid && !s_bready |=> s_bvalid);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata));

endmodule
