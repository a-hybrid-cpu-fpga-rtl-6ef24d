// tb_data_dispatch_unit: checks every block generation pattern of the default
// specialisation (LP = 6, LS = 8).
//
// Random contents are placed in the source buffers.  For every dispatch state (the rounds
// of loops 1, 2, 3 and the 42 loop5 state groups) the control fields are set from the
// state table, and the 64-byte block must equal the block cut from the message built
// independently from the same byte values (A = pwd|salt|pwd, B, P, CryptPad C(i) with
// TP = pwd buffer, TS = first LS bytes of DS, DC from DB for even i and DA for odd i) and
// padded the SHA-256 way.  Also checks the 4-bit control field width and 46 states that
// the document gives for LP = 6, LS = 8.
module tb_data_dispatch_unit;
  import sc_pkg::*;
  import sc_ref_pkg::*;

  localparam int LP = 6, LS = 8;
  localparam int CSW = cs_width(LP, LS);
  localparam int NSRC = src_bytes(LP, LS);
  localparam maps_t MAPS = compute_maps(LP, LS);

  logic [NSRC-1:0][7:0]           src;
  logic [BLOCK_BYTES-1:0][CSW-1:0] cs;
  block_t                         blk;
  int checks = 0, failures = 0;

  data_dispatch_unit #(.LP(LP), .LS(LS)) dut (.*);

  bytes_t pwd, salt;
  dig_t   da, db, ds;

  function automatic bytes_t pad(input bytes_t m);
    bytes_t r = m;
    longint bits = longint'(m.size()) * 8;
    r.push_back(8'h80);
    while ((r.size() % 64) != 56) r.push_back(8'h00);
    for (int i = 7; i >= 0; i--) r.push_back(8'((bits >> (8 * i)) & 255));
    return r;
  endfunction

  function automatic bytes_t message(input int loop, input int i);
    bytes_t m, tp, ts;
    tp = pwd;
    ts = dig_bytes(ds, LS);
    case (loop)
      1: begin append(m, pwd); append(m, salt); append(m, pwd); end
      2: begin
        append(m, pwd); append(m, salt); append_dig(m, da, LP);
        for (int n = LP; n > 0; n = n >> 1)
          if ((n & 1) != 0) append_dig(m, da, 32); else append(m, pwd);
      end
      3: for (int k = 0; k < LP; k++) append(m, pwd);
      default: begin
        if (i % 2 != 0) append(m, tp); else append_dig(m, db, 32);
        if (i % 3 != 0) append(m, ts);
        if (i % 7 != 0) append(m, tp);
        if (i % 2 != 0) append_dig(m, da, 32); else append(m, tp);
      end
    endcase
    return pad(m);
  endfunction

  initial begin
    bytes_t msg;
    int     s = 0;
    int     nst;
    block_t exp_blk;
    sinfo_t si;
    for (int k = 0; k < LP; k++) pwd.push_back(8'($urandom));
    for (int k = 0; k < LS; k++) salt.push_back(8'($urandom));
    for (int k = 0; k < 32; k++) begin
      da[k] = 8'($urandom); db[k] = 8'($urandom); ds[k] = 8'($urandom);
    end
    for (int k = 0; k < LP; k++) src[k] = pwd[k];
    for (int k = 0; k < LS; k++) src[LP+k] = salt[k];
    for (int k = 0; k < 32; k++) begin
      src[LP+LS+k] = da[k]; src[LP+LS+32+k] = db[k]; src[LP+LS+64+k] = ds[k];
    end
    nst = num_states(LP, LS);
    checks++;
    if (nst != 46 || CSW != 4) begin
      failures++;
      $display("states %0d (expected 46), control width %0d (expected 4)", nst, CSW);
    end
    $display("LP=%0d LS=%0d: %0d states, %0d-bit controls, %0d multiplexer inputs in total",
             LP, LS, nst, CSW, total_cands(MAPS));
    for (int loop = 1; loop <= 5; loop++) begin
      if (loop == 4) continue;
      for (int i = 0; i < ((loop == 5) ? 42 : 1); i++) begin
        msg = message(loop, i);
        for (int r = 0; r < msg.size() / 64; r++) begin
          si = state_info(LP, LS, s);
          for (int p = 0; p < 64; p++) begin
            cs[p] = CSW'(code_rank(MAPS[p], state_code(LP, LS, si, p)));
            exp_blk[p] = msg[64*r+p];
          end
          #1;
          checks++;
          if (blk !== exp_blk) begin
            failures++;
            $display("state %0d (loop%0d i=%0d round %0d): %h expected %h", s, loop, i, r,
                     blk, exp_blk);
          end
          s++;
        end
      end
    end
    checks++;
    if (s != nst) begin
      failures++;
      $display("the messages have %0d blocks, the state table %0d states", s, nst);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
