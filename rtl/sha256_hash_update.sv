// sha256_hash_update: the eight hash-result registers H_0..H_7 of SHA-256,
// their initialisation and the hash update after each block.
//
// init loads the standard's initial values (6a09e667 ... 5be0cd19); upd adds
// the working variables a..h word by word, H_j <- H_j + var_j (mod 2^32),
// with eight 32-bit adders. init has priority over upd. h_start is what the
// compression variables start a block from: the initial values themselves
// while init is high (so the first block of a message loads in the same
// cycle the registers are initialised), the registers otherwise. digest is
// the register contents, H_0 in bits 255:224. Reset also loads the initial
// values. The update and the initial values are the standard's; the h_start
// bypass and the reset value are this design's choices.
module sha256_hash_update
  import sha256_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  init,
  input  logic  upd,
  input  hash_t vars,
  output hash_t h_start,
  output hash_t digest
);

  hash_t h_q, h_sum;

  always_comb begin
    for (int j = 0; j < 8; j++) h_sum[j] = h_q[j] + vars[j];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    h_q <= H_INIT;
    else if (init) h_q <= H_INIT;
    else if (upd)  h_q <= h_sum;
  end

  assign h_start = init ? H_INIT : h_q;
  assign digest  = h_q;

endmodule
