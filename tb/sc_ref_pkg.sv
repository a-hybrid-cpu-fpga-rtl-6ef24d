// sc_ref_pkg: behavioural reference model for the testbenches.
//
// A plain software SHA-256 over byte queues and sha256crypt computed step by step, written
// independently of the RTL (no shared functions other than the byte-order types).  The
// crypt model returns the 32-byte DC value the accelerator produces, and also the final
// "$5$" string with the sha256crypt base64 encoding, so it can be checked against a
// published hash.  rounds_fpga() counts the SHA-256 blocks of loops 1, 2, 3 and 5 of one
// password, i.e. the rounds one core executes.
package sc_ref_pkg;

  typedef byte unsigned bytes_t[$];
  typedef logic [31:0][7:0] dig_t;   // [0] = first digest byte

  function automatic logic [31:0] ror(input logic [31:0] x, input int n);
    return (x >> n) | (x << (32 - n));
  endfunction

  function automatic logic [31:0] kconst(input int t);
    logic [31:0] k [64] = '{
      32'h428a2f98, 32'h71374491, 32'hb5c0fbcf, 32'he9b5dba5, 32'h3956c25b, 32'h59f111f1,
      32'h923f82a4, 32'hab1c5ed5, 32'hd807aa98, 32'h12835b01, 32'h243185be, 32'h550c7dc3,
      32'h72be5d74, 32'h80deb1fe, 32'h9bdc06a7, 32'hc19bf174, 32'he49b69c1, 32'hefbe4786,
      32'h0fc19dc6, 32'h240ca1cc, 32'h2de92c6f, 32'h4a7484aa, 32'h5cb0a9dc, 32'h76f988da,
      32'h983e5152, 32'ha831c66d, 32'hb00327c8, 32'hbf597fc7, 32'hc6e00bf3, 32'hd5a79147,
      32'h06ca6351, 32'h14292967, 32'h27b70a85, 32'h2e1b2138, 32'h4d2c6dfc, 32'h53380d13,
      32'h650a7354, 32'h766a0abb, 32'h81c2c92e, 32'h92722c85, 32'ha2bfe8a1, 32'ha81a664b,
      32'hc24b8b70, 32'hc76c51a3, 32'hd192e819, 32'hd6990624, 32'hf40e3585, 32'h106aa070,
      32'h19a4c116, 32'h1e376c08, 32'h2748774c, 32'h34b0bcb5, 32'h391c0cb3, 32'h4ed8aa4a,
      32'h5b9cca4f, 32'h682e6ff3, 32'h748f82ee, 32'h78a5636f, 32'h84c87814, 32'h8cc70208,
      32'h90befffa, 32'ha4506ceb, 32'hbef9a3f7, 32'hc67178f2};
    return k[t];
  endfunction

  // One compression of a 64-byte block starting at m[off] into h.
  function automatic void compress(ref logic [31:0] h [8], input bytes_t m, input int off);
    logic [31:0] w [64];
    logic [31:0] a, b, c, d, e, f, g, hh, t1, t2, s0, s1;
    for (int t = 0; t < 16; t++)
      w[t] = {m[off+4*t], m[off+4*t+1], m[off+4*t+2], m[off+4*t+3]};
    for (int t = 16; t < 64; t++) begin
      s0 = ror(w[t-15], 7) ^ ror(w[t-15], 18) ^ (w[t-15] >> 3);
      s1 = ror(w[t-2], 17) ^ ror(w[t-2], 19) ^ (w[t-2] >> 10);
      w[t] = w[t-16] + s0 + w[t-7] + s1;
    end
    a = h[0]; b = h[1]; c = h[2]; d = h[3]; e = h[4]; f = h[5]; g = h[6]; hh = h[7];
    for (int t = 0; t < 64; t++) begin
      t1 = hh + (ror(e, 6) ^ ror(e, 11) ^ ror(e, 25)) + ((e & f) ^ ((~e) & g)) + kconst(t) + w[t];
      t2 = (ror(a, 2) ^ ror(a, 13) ^ ror(a, 22)) + ((a & b) ^ (a & c) ^ (b & c));
      hh = g; g = f; f = e; e = d + t1; d = c; c = b; b = a; a = t1 + t2;
    end
    h[0] += a; h[1] += b; h[2] += c; h[3] += d; h[4] += e; h[5] += f; h[6] += g; h[7] += hh;
  endfunction

  function automatic int nblocks(input int len);
    return (len + 8) / 64 + 1;
  endfunction

  function automatic dig_t sha256(input bytes_t msg);
    logic [31:0] h [8] = '{32'h6a09e667, 32'hbb67ae85, 32'h3c6ef372, 32'ha54ff53a,
                           32'h510e527f, 32'h9b05688c, 32'h1f83d9ab, 32'h5be0cd19};
    bytes_t      m = msg;
    longint      bits = longint'(msg.size()) * 8;
    dig_t        d;
    m.push_back(8'h80);
    while ((m.size() % 64) != 56) m.push_back(8'h00);
    for (int i = 7; i >= 0; i--) m.push_back(8'((bits >> (8 * i)) & 255));
    for (int off = 0; off < m.size(); off += 64) compress(h, m, off);
    for (int i = 0; i < 8; i++)
      for (int b = 0; b < 4; b++) d[4*i+b] = h[i][31-8*b -: 8];
    return d;
  endfunction

  function automatic void append(ref bytes_t m, input bytes_t x);
    foreach (x[i]) m.push_back(x[i]);
  endfunction

  function automatic void append_dig(ref bytes_t m, input dig_t d, input int n);
    for (int i = 0; i < n; i++) m.push_back(d[i % 32]);
  endfunction

  function automatic bytes_t dig_bytes(input dig_t d, input int n);
    bytes_t r;
    for (int i = 0; i < n; i++) r.push_back(d[i % 32]);
    return r;
  endfunction

  // DS for a given first byte of DB: SHA-256 of the salt repeated 16 + db0 times.
  function automatic dig_t ds_of(input bytes_t salt, input int db0);
    bytes_t s;
    for (int i = 0; i < 16 + db0; i++) append(s, salt);
    return sha256(s);
  endfunction

  // sha256crypt up to the final digest (DC after N iterations).
  function automatic dig_t crypt_dc(input bytes_t pwd, input bytes_t salt, input int n_iter);
    bytes_t a, b, p, c, tp, ts;
    dig_t   da, db, dp, ds, dc;
    int     lp = pwd.size();
    append(a, pwd); append(a, salt); append(a, pwd);
    da = sha256(a);
    append(b, pwd); append(b, salt); append_dig(b, da, lp);
    for (int n = lp; n > 0; n = n >> 1)
      if ((n & 1) != 0) append_dig(b, da, 32); else append(b, pwd);
    db = sha256(b);
    for (int i = 0; i < lp; i++) append(p, pwd);
    dp = sha256(p);
    ds = ds_of(salt, int'(db[0]));
    tp = dig_bytes(dp, lp);
    ts = dig_bytes(ds, salt.size());
    dc = db;
    for (int i = 0; i < n_iter; i++) begin
      c.delete();
      if (i % 2 != 0) append(c, tp); else append_dig(c, dc, 32);
      if (i % 3 != 0) append(c, ts);
      if (i % 7 != 0) append(c, tp);
      if (i % 2 != 0) append_dig(c, dc, 32); else append(c, tp);
      dc = sha256(c);
    end
    return dc;
  endfunction

  // SHA-256 blocks of loops 1, 2, 3 and 5 of one password.
  function automatic longint rounds_fpga(input int lp, input int ls, input int n_iter);
    int     lb = 2 * lp + ls;
    longint r;
    int     lc;
    for (int n = lp; n > 0; n = n >> 1) lb += ((n & 1) != 0) ? 32 : lp;
    r = nblocks(2 * lp + ls) + nblocks(lb) + nblocks(lp * lp);
    for (int i = 0; i < n_iter; i++) begin
      lc = ((i % 2 != 0) ? lp : 32) + ((i % 3 != 0) ? ls : 0) + ((i % 7 != 0) ? lp : 0) +
           ((i % 2 != 0) ? 32 : lp);
      r += nblocks(lc);
    end
    return r;
  endfunction

  // sha256crypt base64 of the final digest.
  function automatic string crypt_b64(input dig_t d);
    string cs = "./0123456789ABCDEFGHIJKLMNOPQRSTUVWXYZabcdefghijklmnopqrstuvwxyz";
    int    grp [11][3] = '{'{0, 10, 20}, '{21, 1, 11}, '{12, 22, 2}, '{3, 13, 23},
                           '{24, 4, 14}, '{15, 25, 5}, '{6, 16, 26}, '{27, 7, 17},
                           '{18, 28, 8}, '{9, 19, 29}, '{-1, 31, 30}};
    string s = "";
    int    w, nch;
    for (int k = 0; k < 11; k++) begin
      w = ((grp[k][0] < 0) ? 0 : int'(d[grp[k][0]]) << 16) | (int'(d[grp[k][1]]) << 8) |
          int'(d[grp[k][2]]);
      nch = (k == 10) ? 3 : 4;
      for (int j = 0; j < nch; j++) begin
        s = {s, string'(cs[w & 63])};
        w = w >> 6;
      end
    end
    return s;
  endfunction

  function automatic bytes_t str_bytes(input string s);
    bytes_t r;
    for (int i = 0; i < s.len(); i++) r.push_back(byte'(s[i]));
    return r;
  endfunction

endpackage
