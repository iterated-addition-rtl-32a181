// sha256_pkg: word and hash types, the SHA-256 bit functions and the initial
// hash values shared by the SHA-256 unit.
//
// A word is 32 bits. A hash (or the variable set a..h) is eight words packed
// most significant first: H_0 (or a) is element 7, in bits 255:224, and H_7
// (or h) is element 0, in bits 31:0, the order the SHA-256 standard uses.
// The functions are the standard's: right rotation, the two message-schedule
// functions sigma0/sigma1, the two compression functions Sigma0/Sigma1 and
// the bitwise Ch and Maj. All are pure combinational logic.
package sha256_pkg;

  typedef logic [31:0] word_t;
  typedef word_t [7:0] hash_t;

  // Initial hash words H_0..H_7 (H_0 leftmost, element 7).
  localparam hash_t H_INIT = '{
    32'h6a09e667, 32'hbb67ae85, 32'h3c6ef372, 32'ha54ff53a,
    32'h510e527f, 32'h9b05688c, 32'h1f83d9ab, 32'h5be0cd19
  };

  // Rotate x right by p positions.
  function automatic word_t rotr(input word_t x, input int unsigned p);
    return (x >> p) | (x << (32 - p));
  endfunction

  function automatic word_t small_sigma0(input word_t x);
    return rotr(x, 7) ^ rotr(x, 18) ^ (x >> 3);
  endfunction

  function automatic word_t small_sigma1(input word_t x);
    return rotr(x, 17) ^ rotr(x, 19) ^ (x >> 10);
  endfunction

  function automatic word_t big_sigma0(input word_t x);
    return rotr(x, 2) ^ rotr(x, 13) ^ rotr(x, 22);
  endfunction

  function automatic word_t big_sigma1(input word_t x);
    return rotr(x, 6) ^ rotr(x, 11) ^ rotr(x, 25);
  endfunction

  function automatic word_t ch(input word_t x, input word_t y, input word_t z);
    return (x & y) ^ (~x & z);
  endfunction

  function automatic word_t maj(input word_t x, input word_t y, input word_t z);
    return (x & y) ^ (x & z) ^ (y & z);
  endfunction

endpackage
