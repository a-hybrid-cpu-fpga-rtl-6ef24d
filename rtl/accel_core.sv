// accel_core: one sha256crypt accelerating core.
//
// A core computes sha256crypt (up to the final base64 encoding) for a group of G passwords
// of the same length LP that share one salt of length LS and one iteration count N.  It
// holds the input sources in per-password buffers -- pwd(TP), salt, DA(DP,DC), DB(DC),
// DS(TS) -- plus a state buffer for multi-block messages and the LAE buffer with the 256
// host-precomputed DS digests.  Every round of every loop processes the whole group:
// for g = 0..G-1, one block per cycle, the dispatch unit assembles block g from buffer
// entry g under the control word of the current FSM state, and the 64-stage block
// transform unit hashes it starting from the IV (first round of a loop) or from the
// password's entry of the state buffer.  Digests come back 64 cycles later and are
// written to the state buffer (round not last) or to the data buffer named by the control
// word (last round); after loop2 the first digest byte DB[0] selects DS from the LAE
// buffer.  In loop5, DC is read from DB and written to DA on even iterations and the
// reverse on odd ones.  This is group scheduling: the blocks of one round belong to
// different passwords, so the pipeline never waits on a data dependency.
//
// Timing: a round lasts exactly G + 64 cycles (G issue cycles, then 64 cycles for the
// pipeline to empty), so the block transform unit is busy G/(G+64) of the time, as the
// document computes.  Requires G >= 4 so that a digest is written before the next round
// reads the same entry.  done rises a few cycles after the last digest is stored.
//
// Host interface (this design's own choice, the document only says AXI): while the core is
// idle the host writes 32-bit words with hw_en / hw_tgt (pwd entry, salt, LAE row) /
// hw_index (password or LAE row) / hw_word (word w carries bytes 4w..4w+3, byte 4w in
// bits 7:0).  start (one cycle) launches the run with n_iter iterations (n_iter >= 1).
// After done the host reads result word hr_word of password hr_index on hr_data in the
// following cycle; the core picks DA or DB from the parity of n_iter.
//
// rst_n is an asynchronous reset; the handshake assertions also use it in "disable iff",
// which lint reports as a synchronous use of the same net.  That is intended.
module accel_core
  import sc_pkg::*;
#(
  parameter int  LP   = 6,
  parameter int  LS   = 8,
  parameter int  G    = 2048,
  localparam int GW   = $clog2(G),
  localparam int CSW  = cs_width(LP, LS),
  localparam int NSRC = src_bytes(LP, LS)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] n_iter,
  output logic        busy,
  output logic        done,
  input  logic        hw_en,
  input  host_tgt_e   hw_tgt,
  input  logic [15:0] hw_index,
  input  logic [2:0]  hw_word,
  input  logic [31:0] hw_data,
  input  logic [15:0] hr_index,
  input  logic [2:0]  hr_word,
  output logic [31:0] hr_data
);

  if (G < 4)   begin : g_chk_g  $error("accel_core: G must be at least 4"); end
  if (LP > 32) begin : g_chk_lp $error("accel_core: LP must not exceed 32"); end
  if (LS > 32) begin : g_chk_ls $error("accel_core: LS must not exceed 32"); end

  localparam int PERIOD = G + BTU_STAGES;
  localparam int CW     = $clog2(PERIOD);
  localparam int TAG_W  = GW + 3;

  typedef struct packed {
    logic [GW-1:0] idx;
    logic          last;
    dest_e         dest;
  } tag_t;

  // ------------------------------------------------------------------ sequencing
  logic                          run_q, done_q;
  logic [CW-1:0]                 cyc_q;
  logic                          issue, step;
  logic                          issue_v_q;
  logic [GW-1:0]                 issue_g_q;
  logic [BLOCK_BYTES-1:0][CSW-1:0] cs;
  logic                          f_first, f_last, f_eol, f_end;
  dest_e                         f_dest;
  logic                          btu_busy;
  logic                          ds_valid;

  assign issue = run_q && !f_end && (int'(cyc_q) < G);
  assign step  = run_q && !f_end && (int'(cyc_q) == PERIOD - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q     <= 1'b0;
      done_q    <= 1'b0;
      cyc_q     <= '0;
      issue_v_q <= 1'b0;
      issue_g_q <= '0;
    end else begin
      issue_v_q <= issue;
      issue_g_q <= cyc_q[GW-1:0];
      if (start) begin
        run_q  <= 1'b1;
        done_q <= 1'b0;
        cyc_q  <= '0;
      end else if (run_q) begin
        if (f_end) begin
          if (!btu_busy && !ds_valid && !issue_v_q) begin
            run_q  <= 1'b0;
            done_q <= 1'b1;
          end
        end else begin
          cyc_q <= (int'(cyc_q) == PERIOD - 1) ? '0 : cyc_q + 1'b1;
        end
      end
    end
  end

  assign busy = run_q;
  assign done = done_q;

  dispatch_fsm #(.LP(LP), .LS(LS)) u_fsm (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (start),
    .step   (step),
    .n_iter (n_iter),
    .cs     (cs),
    .first  (f_first),
    .last   (f_last),
    .dest   (f_dest),
    .eol    (f_eol),
    .at_end (f_end),
    .state  (),
    .ic     ()
  );

  // ------------------------------------------------------------------ buffers
  logic [GW-1:0] rd_idx;
  assign rd_idx = run_q ? cyc_q[GW-1:0] : hr_index[GW-1:0];

  // block transform write-back
  logic    wb_valid;
  digest_t wb_dig;
  tag_t    wb_tag;
  logic    wb_final;
  assign wb_final = wb_valid && wb_tag.last;

  // host write data, replicated to every word lane
  function automatic logic [31:0] word_be(input logic [2:0] w);
    logic [31:0] be = '0;
    for (int b = 0; b < 32; b++) be[b] = (b / 4 == int'(w));
    return be;
  endfunction
  digest_t     host_row;
  logic [31:0] host_be;
  always_comb begin
    for (int b = 0; b < 32; b++) host_row[b] = hw_data[8*(b%4) +: 8];
    host_be = word_be(hw_word);
  end
  logic host_wr;
  assign host_wr = hw_en && !run_q;

  // pwd(TP) buffer: host writes the passwords, loop3 overwrites them with TP
  logic                 pwd_we;
  logic [GW-1:0]        pwd_wa;
  logic [LP-1:0]        pwd_be;
  logic [LP-1:0][7:0]   pwd_wd, pwd_rd;
  always_comb begin
    if (run_q) begin
      pwd_we = wb_final && (wb_tag.dest == DEST_TP);
      pwd_wa = wb_tag.idx;
      pwd_be = '1;
      pwd_wd = wb_dig[LP-1:0];
    end else begin
      pwd_we = host_wr && (hw_tgt == TGT_PWD);
      pwd_wa = hw_index[GW-1:0];
      pwd_be = host_be[LP-1:0];
      pwd_wd = host_row[LP-1:0];
    end
  end
  data_buffer #(.NBYTES(LP), .DEPTH(G)) u_pwd (
    .clk(clk), .we(pwd_we), .waddr(pwd_wa), .wbe(pwd_be), .wdata(pwd_wd),
    .raddr(rd_idx), .rdata(pwd_rd));

  // salt buffer: one entry shared by the group
  logic [LS-1:0][7:0] salt_q;
  always_ff @(posedge clk)
    if (host_wr && hw_tgt == TGT_SALT)
      for (int b = 0; b < LS; b++)
        if (host_be[b]) salt_q[b] <= host_row[b];

  // DA(DP,DC) and DB(DC) buffers
  digest_t da_rd, db_rd, ds_rd;
  logic    da_we, db_we;
  assign da_we = wb_final && (wb_tag.dest == DEST_DA || wb_tag.dest == DEST_TP);
  assign db_we = wb_final && (wb_tag.dest == DEST_DB || wb_tag.dest == DEST_DB_LAE);
  data_buffer #(.NBYTES(32), .DEPTH(G)) u_da (
    .clk(clk), .we(da_we), .waddr(wb_tag.idx), .wbe('1), .wdata(wb_dig),
    .raddr(rd_idx), .rdata(da_rd));
  data_buffer #(.NBYTES(32), .DEPTH(G)) u_db (
    .clk(clk), .we(db_we), .waddr(wb_tag.idx), .wbe('1), .wdata(wb_dig),
    .raddr(rd_idx), .rdata(db_rd));

  // LAE buffer and DS(TS) buffer
  digest_t       lae_ds;
  logic [GW-1:0] ds_idx;
  lae_buffer #(.IDX_W(GW)) u_lae (
    .clk       (clk),
    .rst_n     (rst_n),
    .host_we   (host_wr && hw_tgt == TGT_LAE),
    .host_addr (hw_index[7:0]),
    .host_be   (host_be),
    .host_data (host_row),
    .db_valid  (wb_final && wb_tag.dest == DEST_DB_LAE),
    .db        (wb_dig),
    .db_idx    (wb_tag.idx),
    .ds_valid  (ds_valid),
    .ds        (lae_ds),
    .ds_idx    (ds_idx)
  );
  data_buffer #(.NBYTES(32), .DEPTH(G)) u_ds (
    .clk(clk), .we(ds_valid), .waddr(ds_idx), .wbe('1), .wdata(lae_ds),
    .raddr(rd_idx), .rdata(ds_rd));

  // state buffer: intermediate digests of multi-block messages
  digest_t st_rd;
  data_buffer #(.NBYTES(32), .DEPTH(G)) u_state (
    .clk(clk), .we(wb_valid && !wb_tag.last), .waddr(wb_tag.idx), .wbe('1), .wdata(wb_dig),
    .raddr(rd_idx), .rdata(st_rd));

  // ------------------------------------------------------------------ datapath
  logic [NSRC-1:0][7:0] src;
  block_t               blk;
  assign src = {ds_rd, db_rd, da_rd, salt_q, pwd_rd};

  data_dispatch_unit #(.LP(LP), .LS(LS)) u_ddu (
    .src (src),
    .cs  (cs),
    .blk (blk)
  );

  tag_t    in_tag;
  hstate_t in_state;
  assign in_tag   = '{idx: issue_g_q, last: f_last, dest: f_dest};
  assign in_state = f_first ? SHA256_IV : digest_to_state(st_rd);   // "is first round?"

  logic [TAG_W-1:0] out_tag;
  block_transform_unit #(.TAG_W(TAG_W)) u_btu (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (issue_v_q),
    .in_block   (blk),
    .in_state   (in_state),
    .in_tag     (TAG_W'(in_tag)),
    .out_valid  (wb_valid),
    .out_digest (wb_dig),
    .out_tag    (out_tag),
    .busy       (btu_busy)
  );
  assign wb_tag = tag_t'(out_tag);

  // ------------------------------------------------------------------ result read
  logic [2:0] hr_word_q;
  logic       res_in_da;
  digest_t    res;
  always_ff @(posedge clk) hr_word_q <= hr_word;
  assign res_in_da = n_iter[0];          // last iteration N-1 even -> DC in DA
  assign res       = res_in_da ? da_rd : db_rd;
  always_comb hr_data = res[4*hr_word_q +: 4];

  // ------------------------------------------------------------------ checks
  a_no_host_write_while_running: assert property (@(posedge clk) disable iff (!rst_n)
    !(hw_en && run_q));
  a_no_start_while_running: assert property (@(posedge clk) disable iff (!rst_n)
    !(start && run_q));

endmodule
