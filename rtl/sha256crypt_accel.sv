// sha256crypt_accel: programmable-logic side of the hybrid CPU-FPGA sha256crypt password
// recovery accelerator.
//
// NUM_CORES accelerating cores (two in the document's main configuration) sit behind one
// AXI4-Lite slave port.  The host parses the target hash, precomputes the 256 possible DS
// digests (look-ahead execution), sorts candidate passwords by length, and for each core
// writes the salt, the DS table, a group of G passwords of length LP and the iteration
// count N, then starts the core.  When a core reports done, the host reads back the G
// final DC digests and compares them with the check value of the target hash.  The whole
// design is specialised for one password length LP and salt length LS (one bitstream per
// length in the document); the default LP = 6, LS = 8, G = 2048 is the configuration the
// document details.
//
// Address map (byte addresses, 32-bit words; IW = max(log2 G, 8)):
//   [4:2]          word within an entry (word w = bytes 4w..4w+3, byte 4w in bits 7:0)
//   [5 +: IW]      entry: password index, or LAE row for region 3
//   [5+IW +: 3]    region: 0 control, 1 salt, 2 pwd, 3 LAE, 4 result (read only)
//   [8+IW +: CW]   core
// Control region, entry 0: word 0 write bit 0 = start, read = {done, busy} in bits 1:0;
// word 1 = iteration count N (read/write).  Writes to a busy core's buffers are ignored.
// Partial-word strobes are not supported: every write is taken as a full word.
// The address map and register layout are this design's own choices.
//
// rst_n is an asynchronous reset; the assertions inside the cores also use it in
// "disable iff", which lint reports as a synchronous use of the same net.  That is intended.
// The AXI response codes are always OKAY, so s_bresp and s_rresp are constant outputs.
module sha256crypt_accel
  import sc_pkg::*;
#(
  parameter int  NUM_CORES = 2,
  parameter int  LP        = 6,
  parameter int  LS        = 8,
  parameter int  G         = 2048,
  localparam int GW        = $clog2(G),
  localparam int IW        = (GW > 8) ? GW : 8,
  localparam int CW        = (NUM_CORES > 1) ? $clog2(NUM_CORES) : 1,
  localparam int ADDR_W    = 8 + IW + CW
) (
  input  logic              clk,
  input  logic              rst_n,
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
  output logic [NUM_CORES-1:0] core_done     // level, per core
);

  localparam logic [2:0] R_CTRL = 3'd0, R_SALT = 3'd1, R_PWD = 3'd2, R_LAE = 3'd3,
                         R_RES  = 3'd4;

  logic              bus_we, bus_re;
  logic [ADDR_W-1:0] bus_waddr, bus_raddr;
  logic [31:0]       bus_wdata, bus_rdata;
  logic [3:0]        bus_wstrb;

  axi_host_if #(.ADDR_W(ADDR_W)) u_axi (
    .clk, .rst_n,
    .s_awvalid, .s_awready, .s_awaddr, .s_wvalid, .s_wready, .s_wdata, .s_wstrb,
    .s_bvalid, .s_bready, .s_bresp, .s_arvalid, .s_arready, .s_araddr,
    .s_rvalid, .s_rready, .s_rdata, .s_rresp,
    .bus_we, .bus_waddr, .bus_wdata, .bus_wstrb, .bus_re, .bus_raddr, .bus_rdata);

  // address fields
  logic [2:0]    w_word, r_word;
  logic [IW-1:0] w_idx, r_idx;
  logic [2:0]    w_reg, r_reg;
  logic [CW-1:0] w_core, r_core;
  assign {w_core, w_reg, w_idx, w_word} = bus_waddr[ADDR_W-1:2];
  assign {r_core, r_reg, r_idx, r_word} = bus_raddr[ADDR_W-1:2];

  logic [NUM_CORES-1:0][31:0] c_hr_data, c_niter;
  logic [NUM_CORES-1:0]       c_busy, c_done;

  for (genvar c = 0; c < NUM_CORES; c++) begin : g_core
    logic        sel_w, start, hw_en;
    host_tgt_e   tgt;
    logic [31:0] niter_q;

    assign sel_w = bus_we && (int'(w_core) == c);
    assign start = sel_w && (w_reg == R_CTRL) && (w_idx == '0) && (w_word == 3'd0) &&
                   bus_wdata[0] && !c_busy[c];
    assign hw_en = sel_w && (w_reg == R_SALT || w_reg == R_PWD || w_reg == R_LAE) &&
                   !c_busy[c];
    always_comb
      case (w_reg)
        R_SALT:  tgt = TGT_SALT;
        R_LAE:   tgt = TGT_LAE;
        default: tgt = TGT_PWD;
      endcase

    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) niter_q <= 32'd5000;
      else if (sel_w && w_reg == R_CTRL && w_idx == '0 && w_word == 3'd1 && !c_busy[c])
        niter_q <= bus_wdata;

    accel_core #(.LP(LP), .LS(LS), .G(G)) u_core (
      .clk      (clk),
      .rst_n    (rst_n),
      .start    (start),
      .n_iter   (niter_q),
      .busy     (c_busy[c]),
      .done     (c_done[c]),
      .hw_en    (hw_en),
      .hw_tgt   (tgt),
      .hw_index (16'(w_idx)),
      .hw_word  (w_word),
      .hw_data  (bus_wdata),
      .hr_index (16'(r_idx)),
      .hr_word  (r_word),
      .hr_data  (c_hr_data[c])
    );
    assign c_niter[c] = niter_q;
  end

  // read data, one cycle after the address (bus_raddr is held for the whole read)
  always_comb begin
    bus_rdata = '0;
    if (int'(r_core) < NUM_CORES)
      case (r_reg)
        R_CTRL:  bus_rdata = (r_word == 3'd1) ? c_niter[r_core] :
                             {30'd0, c_done[r_core], c_busy[r_core]};
        R_RES:   bus_rdata = c_hr_data[r_core];
        default: bus_rdata = '0;
      endcase
  end

  assign core_done = c_done;

endmodule
