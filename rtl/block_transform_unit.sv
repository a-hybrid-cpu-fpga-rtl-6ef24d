// block_transform_unit: fully pipelined SHA-256 block transform (SHA256BTF).
//
// One 64-byte block and one 256-bit input state can be accepted every clock cycle.  The
// unit is a chain of 64 stages; stage t performs SHA-256 round t, so a block leaves the
// unit exactly 64 cycles after it entered, as the digest H_in + (a..h after 64 rounds).
// The message schedule is computed on the fly: each stage carries a sliding window of the
// next 16 schedule words and appends W[t+16] = s1(W[t+14]) + W[t+9] + s0(W[t+1]) + W[t].
// The input state rides along with its block so the final addition needs no second read
// of the state buffer.  A tag travels with every block so the caller knows where the
// digest belongs (password index and write-back control in the accelerating core).
//
// Interface: in_valid/in_block/in_state/in_tag are sampled on the rising clock edge;
// out_valid/out_digest/out_tag are valid 64 cycles later.  No back-pressure: the caller
// must accept a digest in the cycle it appears.  busy is high while any stage holds a block.
//
// The 64-stage depth follows the document (one stage per round, chosen there for
// convenience of the design); the round logic itself is standard FIPS 180-4 SHA-256.
module block_transform_unit
  import sc_pkg::*;
#(
  parameter int TAG_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  block_t           in_block,
  input  hstate_t          in_state,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output digest_t          out_digest,
  output logic [TAG_W-1:0] out_tag,
  output logic             busy
);

  localparam int NST = BTU_STAGES;

  typedef struct packed {
    logic [TAG_W-1:0]  tag;
    hstate_t           wk;    // working variables a..h ([0] = a)
    hstate_t           h0;    // input state, for the final addition
    logic [15:0][31:0] win;   // W[t .. t+15], [0] = W[t]
  } stage_t;

  function automatic logic [31:0] rotr(input logic [31:0] x, input int n);
    return (x >> n) | (x << (32 - n));
  endfunction

  function automatic stage_t sha_round(input stage_t s, input logic [31:0] k);
    stage_t      r = s;
    logic [31:0] a = s.wk[0], b = s.wk[1], c = s.wk[2], d = s.wk[3];
    logic [31:0] e = s.wk[4], f = s.wk[5], g = s.wk[6], h = s.wk[7];
    logic [31:0] t1, t2, w16;
    t1 = h + (rotr(e, 6) ^ rotr(e, 11) ^ rotr(e, 25)) + ((e & f) ^ (~e & g)) + k + s.win[0];
    t2 = (rotr(a, 2) ^ rotr(a, 13) ^ rotr(a, 22)) + ((a & b) ^ (a & c) ^ (b & c));
    r.wk[7] = g;  r.wk[6] = f;  r.wk[5] = e;  r.wk[4] = d + t1;
    r.wk[3] = c;  r.wk[2] = b;  r.wk[1] = a;  r.wk[0] = t1 + t2;
    w16 = (rotr(s.win[14], 17) ^ rotr(s.win[14], 19) ^ (s.win[14] >> 10)) + s.win[9] +
          (rotr(s.win[1], 7) ^ rotr(s.win[1], 18) ^ (s.win[1] >> 3)) + s.win[0];
    r.win = {w16, s.win[15:1]};
    return r;
  endfunction

  stage_t         stg_q [NST];
  logic [NST-1:0] vld_q;
  stage_t         first;

  always_comb begin
    first.tag = in_tag;
    first.wk  = in_state;
    first.h0  = in_state;
    for (int i = 0; i < 16; i++)
      first.win[i] = {in_block[4*i], in_block[4*i+1], in_block[4*i+2], in_block[4*i+3]};
  end

  for (genvar t = 0; t < NST; t++) begin : g_stage
    localparam logic [31:0] KT = sha_k(t);
    stage_t prev;
    if (t == 0) begin : g_in
      assign prev = first;
    end else begin : g_chain
      assign prev = stg_q[t-1];
    end
    always_ff @(posedge clk) stg_q[t] <= sha_round(prev, KT);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld_q <= '0;
    else        vld_q <= {vld_q[NST-2:0], in_valid};
  end

  hstate_t sum;
  always_comb
    for (int i = 0; i < 8; i++) sum[i] = stg_q[NST-1].wk[i] + stg_q[NST-1].h0[i];

  assign out_valid  = vld_q[NST-1];
  assign out_digest = state_to_digest(sum);
  assign out_tag    = stg_q[NST-1].tag;
  assign busy       = |vld_q;

endmodule
