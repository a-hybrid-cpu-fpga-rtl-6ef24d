// sc_pkg: types, SHA-256 constants and the sha256crypt block-generation model shared by
// the accelerating-core modules.
//
// The second half of the package describes, at elaboration time, every 64-byte block that
// one sha256crypt thread feeds to SHA-256 on the FPGA (loop1 = message A, loop2 = B,
// loop3 = P, loop5 = C; loop4, the digest of S, is precomputed by the host).  Every byte of
// every block is given a 9-bit "source code":
//   code[8] = 1 : the constant byte code[7:0] (0x80 pad marker, 0x00 fill, length bytes);
//   code[8] = 0 : byte code[7:0] of the flattened source vector
//                 { DS(TS) buffer 32 B, DB(DC) buffer 32 B, DA(DP,DC) buffer 32 B,
//                   salt LS B, pwd(TP) LP B }  with pwd byte 0 at index 0.
// A dispatch "state" is one round (one block) of one loop.  States are numbered in order:
// the rounds of loop1, loop2, loop3, then 42 state groups for loop5 (iteration counter
// i mod 42, since the CryptPad pattern repeats with period lcm(2,3,7) = 42), then S_E.
// For every block position the set of codes used over all states is collected in a
// 512-bit map; the position's multiplexer has exactly those inputs (data path pruning for
// one fixed password length), and a state's control field for that position is the rank of
// its code in the map.  Buffer sharing follows the document's table of buffers:
// TP lives in the pwd buffer, TS in the DS buffer, DC alternates between DA and DB.
// Candidate order within a multiplexer (ascending code) is this design's own choice.
package sc_pkg;

  localparam int BLOCK_BYTES  = 64;
  localparam int DIGEST_BYTES = 32;
  localparam int SG5_GROUPS   = 42;   // lcm(2,3,7)
  localparam int BTU_STAGES   = 64;   // one SHA-256 round per pipeline stage

  typedef logic [BLOCK_BYTES-1:0][7:0]  block_t;   // [0] is the first message byte
  typedef logic [DIGEST_BYTES-1:0][7:0] digest_t;  // [0] is the first digest byte
  typedef logic [7:0][31:0]             hstate_t;  // [0] is H0 (working variable a)
  typedef logic [8:0]                   code_t;
  typedef logic [BLOCK_BYTES-1:0][511:0] maps_t;

  // Where the digest of the last round of a loop is written.
  typedef enum logic [1:0] {
    DEST_DA     = 2'd0,   // DA buffer (DA, DC of even iterations)
    DEST_DB     = 2'd1,   // DB buffer (DC of odd iterations)
    DEST_DB_LAE = 2'd2,   // DB buffer, and DB[0] selects DS from the LAE buffer
    DEST_TP     = 2'd3    // DP: first LP bytes to the pwd(TP) buffer, all to DA
  } dest_e;

  // Host-side write targets of a core.
  typedef enum logic [1:0] {
    TGT_PWD  = 2'd0,
    TGT_SALT = 2'd1,
    TGT_LAE  = 2'd2
  } host_tgt_e;

  localparam hstate_t SHA256_IV = {
    32'h5be0cd19, 32'h1f83d9ab, 32'h9b05688c, 32'h510e527f,
    32'ha54ff53a, 32'h3c6ef372, 32'hbb67ae85, 32'h6a09e667};

  function automatic logic [31:0] sha_k(input int t);
    logic [31:0] k;
    case (t)
      0: k = 32'h428a2f98;  1: k = 32'h71374491;  2: k = 32'hb5c0fbcf;  3: k = 32'he9b5dba5;
      4: k = 32'h3956c25b;  5: k = 32'h59f111f1;  6: k = 32'h923f82a4;  7: k = 32'hab1c5ed5;
      8: k = 32'hd807aa98;  9: k = 32'h12835b01; 10: k = 32'h243185be; 11: k = 32'h550c7dc3;
     12: k = 32'h72be5d74; 13: k = 32'h80deb1fe; 14: k = 32'h9bdc06a7; 15: k = 32'hc19bf174;
     16: k = 32'he49b69c1; 17: k = 32'hefbe4786; 18: k = 32'h0fc19dc6; 19: k = 32'h240ca1cc;
     20: k = 32'h2de92c6f; 21: k = 32'h4a7484aa; 22: k = 32'h5cb0a9dc; 23: k = 32'h76f988da;
     24: k = 32'h983e5152; 25: k = 32'ha831c66d; 26: k = 32'hb00327c8; 27: k = 32'hbf597fc7;
     28: k = 32'hc6e00bf3; 29: k = 32'hd5a79147; 30: k = 32'h06ca6351; 31: k = 32'h14292967;
     32: k = 32'h27b70a85; 33: k = 32'h2e1b2138; 34: k = 32'h4d2c6dfc; 35: k = 32'h53380d13;
     36: k = 32'h650a7354; 37: k = 32'h766a0abb; 38: k = 32'h81c2c92e; 39: k = 32'h92722c85;
     40: k = 32'ha2bfe8a1; 41: k = 32'ha81a664b; 42: k = 32'hc24b8b70; 43: k = 32'hc76c51a3;
     44: k = 32'hd192e819; 45: k = 32'hd6990624; 46: k = 32'hf40e3585; 47: k = 32'h106aa070;
     48: k = 32'h19a4c116; 49: k = 32'h1e376c08; 50: k = 32'h2748774c; 51: k = 32'h34b0bcb5;
     52: k = 32'h391c0cb3; 53: k = 32'h4ed8aa4a; 54: k = 32'h5b9cca4f; 55: k = 32'h682e6ff3;
     56: k = 32'h748f82ee; 57: k = 32'h78a5636f; 58: k = 32'h84c87814; 59: k = 32'h8cc70208;
     60: k = 32'h90befffa; 61: k = 32'ha4506ceb; 62: k = 32'hbef9a3f7; default: k = 32'hc67178f2;
    endcase
    return k;
  endfunction

  function automatic digest_t state_to_digest(input hstate_t h);
    digest_t d;
    for (int i = 0; i < 8; i++)
      for (int b = 0; b < 4; b++)
        d[4*i+b] = h[i][31-8*b -: 8];
    return d;
  endfunction

  function automatic hstate_t digest_to_state(input digest_t d);
    hstate_t h;
    for (int i = 0; i < 8; i++)
      h[i] = {d[4*i], d[4*i+1], d[4*i+2], d[4*i+3]};
    return h;
  endfunction

  // ---------------------------------------------------------------------------------
  // Elaboration-time model of the block generation patterns.
  // ---------------------------------------------------------------------------------
  localparam int LOOP_A = 1, LOOP_B = 2, LOOP_P = 3, LOOP_C = 5;

  typedef struct packed {
    logic [2:0] loop;   // 1, 2, 3 or 5; 0 for S_E
    logic [7:0] grp;    // loop5 state group (i mod 42)
    logic [7:0] rnd;    // round within the loop
    logic [7:0] nrnd;   // rounds of the loop
  } sinfo_t;

  function automatic int blocks_of(input int len);   // padded SHA-256 blocks
    return (len + 8) / 64 + 1;
  endfunction

  function automatic int len_a(input int lp, input int ls);
    return 2*lp + ls;
  endfunction

  function automatic int len_b(input int lp, input int ls);
    int len = 2*lp + ls;
    for (int n = lp; n > 0; n = n >> 1) len += ((n & 1) != 0) ? 32 : lp;
    return len;
  endfunction

  function automatic int len_p(input int lp);
    return lp * lp;
  endfunction

  function automatic int len_c(input int lp, input int ls, input int i);
    int len = (i % 2 != 0) ? lp : 32;
    if (i % 3 != 0) len += ls;
    if (i % 7 != 0) len += lp;
    len += (i % 2 != 0) ? 32 : lp;
    return len;
  endfunction

  function automatic int rounds_of(input int lp, input int ls, input int loop, input int i);
    case (loop)
      LOOP_A:  return blocks_of(len_a(lp, ls));
      LOOP_B:  return blocks_of(len_b(lp, ls));
      LOOP_P:  return blocks_of(len_p(lp));
      default: return blocks_of(len_c(lp, ls, i));
    endcase
  endfunction

  function automatic code_t c_pwd(input int k);
    return code_t'(k);
  endfunction
  function automatic code_t c_salt(input int lp, input int k);
    return code_t'(lp + k);
  endfunction
  function automatic code_t c_da(input int lp, input int ls, input int k);
    return code_t'(lp + ls + k);
  endfunction
  function automatic code_t c_db(input int lp, input int ls, input int k);
    return code_t'(lp + ls + 32 + k);
  endfunction
  function automatic code_t c_ds(input int lp, input int ls, input int k);
    return code_t'(lp + ls + 64 + k);
  endfunction
  function automatic code_t c_const(input int v);
    return code_t'(256 + (v & 255));
  endfunction

  // Source of message byte q (before padding).
  function automatic code_t msg_code(input int lp, input int ls, input int loop, input int i,
                                     input int q);
    int off;
    code_t c = c_const(0);
    case (loop)
      LOOP_A: begin                               // pwd | salt | pwd
        if (q < lp)                c = c_pwd(q);
        else if (q < lp + ls)      c = c_salt(lp, q - lp);
        else                       c = c_pwd(q - lp - ls);
      end
      LOOP_B: begin                               // pwd | salt | LP bytes of DA* | bit loop
        if (q < lp)                c = c_pwd(q);
        else if (q < lp + ls)      c = c_salt(lp, q - lp);
        else if (q < 2*lp + ls)    c = c_da(lp, ls, (q - lp - ls) % 32);
        else begin
          off = 2*lp + ls;
          for (int n = lp; n > 0; n = n >> 1) begin
            if ((n & 1) != 0) begin
              if (q >= off && q < off + 32) c = c_da(lp, ls, q - off);
              off += 32;
            end else begin
              if (q >= off && q < off + lp) c = c_pwd(q - off);
              off += lp;
            end
          end
        end
      end
      LOOP_P: c = c_pwd(q % lp);                  // pwd repeated LP times
      default: begin                              // CryptPad(TP, TS, DC, i)
        // DC is read from DB on even iterations and from DA on odd ones.
        off = 0;
        if (i % 2 != 0) begin
          if (q < lp) c = c_pwd(q);
          off = lp;
        end else begin
          if (q < 32) c = (i % 2 != 0) ? c_da(lp, ls, q) : c_db(lp, ls, q);
          off = 32;
        end
        if (i % 3 != 0) begin
          if (q >= off && q < off + ls) c = c_ds(lp, ls, q - off);
          off += ls;
        end
        if (i % 7 != 0) begin
          if (q >= off && q < off + lp) c = c_pwd(q - off);
          off += lp;
        end
        if (i % 2 != 0) begin
          if (q >= off && q < off + 32) c = c_da(lp, ls, q - off);
        end else begin
          if (q >= off && q < off + lp) c = c_pwd(q - off);
        end
      end
    endcase
    return c;
  endfunction

  function automatic int msg_len(input int lp, input int ls, input int loop, input int i);
    case (loop)
      LOOP_A:  return len_a(lp, ls);
      LOOP_B:  return len_b(lp, ls);
      LOOP_P:  return len_p(lp);
      default: return len_c(lp, ls, i);
    endcase
  endfunction

  // Source of byte q of the padded message: message, 0x80, zeros, 64-bit big-endian length.
  function automatic code_t pad_code(input int lp, input int ls, input int loop, input int i,
                                     input int q);
    int len    = msg_len(lp, ls, loop, i);
    int padlen = 64 * blocks_of(len);
    longint bits = longint'(len) * 8;
    if (q < len)                 return msg_code(lp, ls, loop, i, q);
    else if (q == len)           return c_const(128);
    else if (q >= padlen - 8)    return c_const(int'((bits >> (8 * (7 - (q - padlen + 8)))) & 255));
    else                         return c_const(0);
  endfunction

  // Number of dispatch states, S_E not included.
  function automatic int num_states(input int lp, input int ls);
    int n = rounds_of(lp, ls, LOOP_A, 0) + rounds_of(lp, ls, LOOP_B, 0) +
            rounds_of(lp, ls, LOOP_P, 0);
    for (int j = 0; j < SG5_GROUPS; j++) n += rounds_of(lp, ls, LOOP_C, j);
    return n;
  endfunction

  // First state of the loop5 state groups.
  function automatic int sg5_first(input int lp, input int ls);
    return rounds_of(lp, ls, LOOP_A, 0) + rounds_of(lp, ls, LOOP_B, 0) +
           rounds_of(lp, ls, LOOP_P, 0);
  endfunction

  function automatic sinfo_t state_info(input int lp, input int ls, input int s);
    sinfo_t si = '0;
    int base = 0;
    int n;
    for (int loop = 1; loop <= 3; loop++) begin
      n = rounds_of(lp, ls, loop, 0);
      if (si.loop == 0 && s < base + n) begin
        si.loop = 3'(loop); si.rnd = 8'(s - base); si.nrnd = 8'(n);
      end
      base += n;
    end
    for (int j = 0; j < SG5_GROUPS; j++) begin
      n = rounds_of(lp, ls, LOOP_C, j);
      if (si.loop == 0 && s < base + n) begin
        si.loop = 3'(LOOP_C); si.grp = 8'(j); si.rnd = 8'(s - base); si.nrnd = 8'(n);
      end
      base += n;
    end
    return si;
  endfunction

  function automatic code_t state_code(input int lp, input int ls, input sinfo_t si,
                                       input int p);
    return pad_code(lp, ls, int'(si.loop), int'(si.grp), 64 * int'(si.rnd) + p);
  endfunction

  // For every block position, the set of source codes used by any state.
  function automatic maps_t compute_maps(input int lp, input int ls);
    maps_t  m = maps_t'(0);
    sinfo_t si;
    int     ns = num_states(lp, ls);
    for (int s = 0; s < ns; s++) begin
      si = state_info(lp, ls, s);
      for (int p = 0; p < BLOCK_BYTES; p++) m[p][state_code(lp, ls, si, p)] = 1'b1;
    end
    return m;
  endfunction

  // The k-th (0-based, ascending) code in a position's map.
  function automatic code_t kth_code(input logic [511:0] map, input int k);
    int    cnt = 0;
    code_t c   = '0;
    for (int v = 0; v < 512; v++)
      if (map[v]) begin
        if (cnt == k) c = code_t'(v);
        cnt++;
      end
    return c;
  endfunction

  function automatic int code_rank(input logic [511:0] map, input code_t c);
    logic [511:0] below = map & ~({512{1'b1}} << c);
    return $countones(below);
  endfunction

  function automatic int max_cands(input maps_t m);
    int mx = 1;
    for (int p = 0; p < BLOCK_BYTES; p++)
      if ($countones(m[p]) > mx) mx = $countones(m[p]);
    return mx;
  endfunction

  function automatic int total_cands(input maps_t m);
    int t = 0;
    for (int p = 0; p < BLOCK_BYTES; p++) t += $countones(m[p]);
    return t;
  endfunction

  // Width of one multiplexer control field.
  function automatic int cs_width(input int lp, input int ls);
    int mx = max_cands(compute_maps(lp, ls));
    return (mx <= 2) ? 1 : $clog2(mx);
  endfunction

  function automatic int src_bytes(input int lp, input int ls);
    return lp + ls + 96;
  endfunction

endpackage
