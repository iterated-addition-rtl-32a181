// sha256_compress: SHA-256 compression function, one iteration per cycle.
//
// Eight 32-bit registers hold the working variables a..h (vars[7] = a,
// vars[0] = h; as a 256-bit vector a is in bits 255:224). With load high
// they take the hash words h_in. With rnd high they perform one iteration
// with round constant k = K(i) and message word w = M_0 = W_i:
//     T1 = h + Sigma1(e) + Ch(e,f,g) + K(i) + W_i
//     T2 = Sigma0(a) + Maj(a,b,c)
//     h <- g, g <- f, f <- e, e <- d + T1, d <- c, c <- b, b <- a,
//     a <- T1 + T2                                   (all mod 2^32)
// load has priority over rnd. The iteration is one combinational stage (two
// adder chains) between the registers, so 64 iterations take 64 cycles. The
// algorithm is the standard's; the single-cycle iteration and the reset to
// zero are this design's choices.
module sha256_compress
  import sha256_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load,
  input  hash_t h_in,
  input  logic  rnd,
  input  word_t k,
  input  word_t w,
  output hash_t vars
);

  hash_t v_q, v_next;
  word_t t1, t2;

  always_comb begin
    // v_q[7..0] = a, b, c, d, e, f, g, h
    t1 = v_q[0] + big_sigma1(v_q[3]) + ch(v_q[3], v_q[2], v_q[1]) + k + w;
    t2 = big_sigma0(v_q[7]) + maj(v_q[7], v_q[6], v_q[5]);
    v_next[7] = t1 + t2;          // a
    v_next[6] = v_q[7];           // b <- a
    v_next[5] = v_q[6];           // c <- b
    v_next[4] = v_q[5];           // d <- c
    v_next[3] = v_q[4] + t1;      // e <- d + T1
    v_next[2] = v_q[3];           // f <- e
    v_next[1] = v_q[2];           // g <- f
    v_next[0] = v_q[1];           // h <- g
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     v_q <= '0;
    else if (load)  v_q <= h_in;
    else if (rnd)   v_q <= v_next;
  end

  assign vars = v_q;

endmodule
