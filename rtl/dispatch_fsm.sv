// dispatch_fsm: look-up-table finite state machine that sequences the block generation
// patterns of one accelerating core.
//
// Each state is one round of one loop (see sc_pkg): the rounds of loop1, loop2 and loop3,
// then 42 state groups SG5_0..SG5_41 for loop5, one per value of the iteration counter
// modulo 42, and the end state S_E.  The look-up-table word of a state holds the next
// state, the 64 multiplexer control fields CS00..CS63, and the end-of-loop5 flag EOL, as
// in the document, plus three fields this design adds so that the rest of the core needs
// no decoding: FIRST (the round starts from the IV), LAST (the digest is final and goes
// to a data buffer rather than to the state buffer) and DEST (which data buffer).  The
// table is a constant computed at elaboration for one (LP, LS) pair, which is how the
// design is specialised per password length.
//
// Timing: the table has a registered read addressed by the next state, so ctrl always
// describes the current state.  start loads S_0 and clears the iteration counter IC.
// step (one pulse per finished round) moves to the next state; when a state with EOL is
// left, IC is incremented, and once IC equals n_iter the FSM enters S_E and stays there
// (at_end = 1).  n_iter must be at least 1.  After reset the FSM rests in S_E.
module dispatch_fsm
  import sc_pkg::*;
#(
  parameter int  LP    = 6,
  parameter int  LS    = 8,
  localparam int CSW   = cs_width(LP, LS),
  localparam int NSTAT = num_states(LP, LS),          // S_0 .. S_{NSTAT-1}; S_E = NSTAT
  localparam int SW    = $clog2(NSTAT + 1)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           start,
  input  logic                           step,
  input  logic [31:0]                    n_iter,
  output logic [BLOCK_BYTES-1:0][CSW-1:0] cs,
  output logic                           first,
  output logic                           last,
  output dest_e                          dest,
  output logic                           eol,
  output logic                           at_end,
  output logic [SW-1:0]                  state,
  output logic [31:0]                    ic
);

  localparam maps_t MAPS = compute_maps(LP, LS);
  localparam int    S_E  = NSTAT;
  localparam int    SG5  = sg5_first(LP, LS);

  typedef struct packed {
    logic [SW-1:0]                    next;
    logic                             eol;
    logic                             first;
    logic                             last;
    dest_e                            dest;
    logic [BLOCK_BYTES-1:0][CSW-1:0]  cs;
  } lut_t;

  function automatic lut_t lut_entry(input int s);
    lut_t   e = '0;
    sinfo_t si;
    if (s >= NSTAT) begin
      e.next = SW'(S_E);
      return e;
    end
    si      = state_info(LP, LS, s);
    e.first = (si.rnd == 0);
    e.last  = (si.rnd == si.nrnd - 1);
    e.eol   = (si.loop == 3'(LOOP_C)) && e.last;
    e.next  = (s == NSTAT - 1) ? SW'(SG5) : SW'(s + 1);
    case (int'(si.loop))
      LOOP_A:  e.dest = DEST_DA;
      LOOP_B:  e.dest = DEST_DB_LAE;
      LOOP_P:  e.dest = DEST_TP;
      default: e.dest = (si.grp[0] == 1'b0) ? DEST_DA : DEST_DB;
    endcase
    for (int p = 0; p < BLOCK_BYTES; p++)
      e.cs[p] = CSW'(code_rank(MAPS[p], state_code(LP, LS, si, p)));
    return e;
  endfunction

  // Constant look-up-table, one word per state.
  lut_t rom [NSTAT + 1];
  for (genvar s = 0; s <= NSTAT; s++) begin : g_rom
    localparam lut_t E = lut_entry(s);
    assign rom[s] = E;
  end

  lut_t          q;
  logic [SW-1:0] nxt;
  logic [31:0]   ic_nxt;

  always_comb begin
    nxt    = state;
    ic_nxt = ic;
    if (start) begin
      nxt    = '0;
      ic_nxt = '0;
    end else if (step && !at_end) begin
      nxt = q.next;
      if (q.eol) begin
        ic_nxt = ic + 32'd1;
        if (ic_nxt >= n_iter) nxt = SW'(S_E);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= SW'(S_E);
      ic    <= '0;
      q     <= '0;
    end else begin
      state <= nxt;
      ic    <= ic_nxt;
      q     <= rom[nxt];
    end
  end

  assign at_end = (state == SW'(S_E));
  assign cs     = q.cs;
  assign first  = q.first;
  assign last   = q.last;
  assign dest   = q.dest;
  assign eol    = q.eol;

endmodule
