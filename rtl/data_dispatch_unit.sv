// data_dispatch_unit: builds one 64-byte SHA-256 block per cycle from the input sources.
//
// There is one byte multiplexer per block position.  Each multiplexer is pruned: it has an
// input only for the source bytes and constants that this position ever takes, over all
// block generation patterns of one password length LP and salt length LS (the candidate
// sets are computed at elaboration by sc_pkg::compute_maps).  Its control field cs[p],
// from the FSM look-up-table, is the rank of the wanted candidate in ascending code order.
// Constants (0x80, 0x00 and the bytes of the 64-bit message length) are wired into the
// multiplexers directly; the document counts the length as an 8-byte source buffer
// instead, which is why its connection count differs slightly from this design's.
//
// Interface: src is the flattened source vector {DS, DB, DA, salt, pwd} (pwd byte 0 at
// index 0); cs holds 64 fields of CSW bits; blk is combinational.  The 64-multiplexer
// structure, the pruning and the per-length specialisation follow the document.
module data_dispatch_unit
  import sc_pkg::*;
#(
  parameter int  LP   = 6,
  parameter int  LS   = 8,
  localparam int CSW  = cs_width(LP, LS),
  localparam int NSRC = src_bytes(LP, LS)
) (
  input  logic [NSRC-1:0][7:0]        src,
  input  logic [BLOCK_BYTES-1:0][CSW-1:0] cs,
  output block_t                      blk
);

  localparam maps_t MAPS = compute_maps(LP, LS);

  for (genvar p = 0; p < BLOCK_BYTES; p++) begin : g_mux
    localparam int NC = $countones(MAPS[p]);
    logic [7:0] cand [NC];
    for (genvar k = 0; k < NC; k++) begin : g_cand
      localparam code_t C = kth_code(MAPS[p], k);
      if (C[8]) begin : g_const
        assign cand[k] = C[7:0];
      end else begin : g_src
        assign cand[k] = src[C[7:0]];
      end
    end
    always_comb begin
      blk[p] = 8'h00;
      for (int k = 0; k < NC; k++)
        if (int'(cs[p]) == k) blk[p] = cand[k];
    end
  end

endmodule
