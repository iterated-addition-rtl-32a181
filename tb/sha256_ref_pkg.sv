// sha256_ref_pkg: reference model of SHA-256 for the testbenches, written
// independently of the RTL.
//
// The round constants and initial hash values are not copied from a table:
// they are computed from their definition, the first 32 bits of the
// fractional parts of the cube roots (K) and square roots (H) of the first
// primes, in double-precision arithmetic with one Newton refinement. A
// block is hashed the textbook way, by expanding the full 64-word array W
// first and then running the compression loop. Padding turns a byte string
// into 512-bit blocks.
package sha256_ref_pkg;

  typedef logic [31:0]  rword_t;
  typedef logic [255:0] rhash_t;

  function automatic int nth_prime(input int n);  // n = 0 gives 2
    int cnt = -1;
    int c = 1;
    while (cnt < n) begin
      bit is_p = 1'b1;
      c++;
      for (int d = 2; d * d <= c; d++) if (c % d == 0) is_p = 1'b0;
      if (is_p) cnt++;
    end
    return c;
  endfunction

  function automatic rword_t frac32(input real x);
    real f = x - $floor(x);
    return rword_t'(longint'($floor(f * 4294967296.0)));
  endfunction

  function automatic rword_t ref_k(input int i);
    real p = real'(nth_prime(i));
    real r = $pow(p, 1.0 / 3.0);
    r = r - (r * r * r - p) / (3.0 * r * r);
    return frac32(r);
  endfunction

  function automatic rword_t ref_h0(input int i);
    real p = real'(nth_prime(i));
    real r = $sqrt(p);
    r = r - (r * r - p) / (2.0 * r);
    return frac32(r);
  endfunction

  function automatic rhash_t ref_iv();
    rhash_t v;
    for (int i = 0; i < 8; i++) v[255 - 32*i -: 32] = ref_h0(i);
    return v;
  endfunction

  function automatic rword_t rr(input rword_t x, input int n);
    rword_t y = x;
    for (int i = 0; i < n; i++) y = {y[0], y[31:1]};
    return y;
  endfunction

  function automatic rword_t ref_s0(input rword_t x);
    return rr(x, 7) ^ rr(x, 18) ^ {3'b0, x[31:3]};
  endfunction

  function automatic rword_t ref_s1(input rword_t x);
    return rr(x, 17) ^ rr(x, 19) ^ {10'b0, x[31:10]};
  endfunction

  // Expanded message words W_0..W_63 of one block.
  function automatic void ref_expand(input logic [511:0] blk, output rword_t w [64]);
    for (int t = 0; t < 16; t++) w[t] = blk[511 - 32*t -: 32];
    for (int t = 16; t < 64; t++)
      w[t] = ref_s1(w[t-2]) + w[t-7] + ref_s0(w[t-15]) + w[t-16];
  endfunction

  // One compression iteration on v = {a,b,c,d,e,f,g,h} (a most significant).
  function automatic rhash_t ref_round(input rhash_t v, input rword_t k, input rword_t w);
    rword_t a = v[255:224], b = v[223:192], c = v[191:160], d = v[159:128];
    rword_t e = v[127:96],  f = v[95:64],   g = v[63:32],   h = v[31:0];
    rword_t S1 = rr(e, 6) ^ rr(e, 11) ^ rr(e, 25);
    rword_t S0 = rr(a, 2) ^ rr(a, 13) ^ rr(a, 22);
    rword_t chv = (e & f) | (~e & g);
    rword_t mjv = (a & b) | (c & (a | b));
    rword_t t1 = h + S1 + chv + k + w;
    rword_t t2 = S0 + mjv;
    return {t1 + t2, a, b, c, d + t1, e, f, g};
  endfunction

  function automatic rhash_t ref_block(input rhash_t hin, input logic [511:0] blk);
    rword_t w [64];
    rhash_t v = hin;
    rhash_t hout;
    ref_expand(blk, w);
    for (int t = 0; t < 64; t++) v = ref_round(v, ref_k(t), w[t]);
    for (int j = 0; j < 8; j++) hout[255 - 32*j -: 32] = hin[255 - 32*j -: 32] + v[255 - 32*j -: 32];
    return hout;
  endfunction

  // Padding: message bytes, a 1 bit, zeros, 64-bit length in bits.
  function automatic void ref_pad(input byte unsigned msg [$], output logic [511:0] blks [$]);
    byte unsigned m [$] = msg;
    longint unsigned bits = 64'(msg.size()) * 8;
    m.push_back(8'h80);
    while (m.size() % 64 != 56) m.push_back(8'h00);
    for (int i = 7; i >= 0; i--) m.push_back(bits[8*i +: 8]);
    blks.delete();
    for (int b = 0; b < m.size() / 64; b++) begin
      logic [511:0] blk;
      for (int i = 0; i < 64; i++) blk[511 - 8*i -: 8] = m[64*b + i];
      blks.push_back(blk);
    end
  endfunction

  function automatic rhash_t ref_hash(input byte unsigned msg [$]);
    logic [511:0] blks [$];
    rhash_t h = ref_iv();
    ref_pad(msg, blks);
    foreach (blks[i]) h = ref_block(h, blks[i]);
    return h;
  endfunction

  function automatic void str_bytes(input string s, output byte unsigned q [$]);
    q.delete();
    for (int i = 0; i < s.len(); i++) q.push_back(s[i]);
  endfunction

endpackage
