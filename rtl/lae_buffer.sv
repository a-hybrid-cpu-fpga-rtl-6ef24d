// lae_buffer: look-ahead execution buffer of one accelerating core.
//
// The host precomputes, for each of the 256 possible values of the first byte DB[0] of the
// digest DB, the digest DS of the salt repeated 16 + DB[0] times, and writes the 256
// digests here before a run.  When the block transform unit delivers a password's DB, its
// first byte is decoded as the row address, and one cycle later the selected DS leaves
// together with the password index so the core can store it in that password's DS(TS)
// entry.  Every password of a group then follows the same execution path.
//
// Interface: host_we/host_addr/host_be/host_data write one row (byte enables as in
// data_buffer).  db_valid/db/db_idx present a DB digest; ds_valid/ds/ds_idx follow one
// cycle later.  The 256 x 32-byte size and the DB[0] decoder follow the document; the
// one-cycle latency is this design's own choice (a synchronous block-RAM read).
module lae_buffer
  import sc_pkg::*;
#(
  parameter int IDX_W = 11
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             host_we,
  input  logic [7:0]       host_addr,
  input  logic [31:0]      host_be,
  input  digest_t          host_data,
  input  logic             db_valid,
  input  digest_t          db,
  input  logic [IDX_W-1:0] db_idx,
  output logic             ds_valid,
  output digest_t          ds,
  output logic [IDX_W-1:0] ds_idx
);

  data_buffer #(.NBYTES(32), .DEPTH(256)) u_mem (
    .clk   (clk),
    .we    (host_we),
    .waddr (host_addr),
    .wbe   (host_be),
    .wdata (host_data),
    .raddr (db[0]),          // the decoder of the document: DB[0] selects one of 256 rows
    .rdata (ds)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ds_valid <= 1'b0;
      ds_idx   <= '0;
    end else begin
      ds_valid <= db_valid;
      ds_idx   <= db_idx;
    end
  end

endmodule
