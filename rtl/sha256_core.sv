// sha256_core: SHA-256 hashing unit. It takes a message as a sequence of
// padded 512-bit blocks and delivers its 256-bit hash.
//
// Datapath: the message schedule (sha256_msg_sched) holds the block's 16
// words and delivers W_i on m0 in iteration i; the round-constant table
// (sha256_k_rom) delivers K(i); the compression function (sha256_compress)
// updates a..h once per cycle; the hash registers (sha256_hash_update) add
// a..h into H_0..H_7 after iteration 63. The schedule and the compression
// loop run in lock-step, one iteration per clock, sequenced by sha256_ctrl.
//
// Interface: offer a block on blk (word M_0 in bits 511:480) with
// blk_valid; it is taken in a cycle where blk_ready is high. Mark the first
// block of a message with blk_first and its last with blk_last (both for a
// one-block message). After the last block's update digest holds the hash
// (H_0 in bits 255:224) and digest_valid is high until the next block is
// taken. Timing: 66 cycles per block (load, 64 iterations, update);
// blk_ready and digest_valid rise 65 clock edges after the edge that took
// the block. Padding is the sender's job.
module sha256_core
  import sha256_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic [511:0] blk,
  input  logic         blk_valid,
  input  logic         blk_first,
  input  logic         blk_last,
  output logic         blk_ready,
  output logic [255:0] digest,
  output logic         digest_valid
);

  logic       ld_mreg, upd_mreg, ld_vars, init_hash, rnd, upd_hash;
  logic [5:0] rnd_idx;
  word_t      m0, k;
  hash_t      vars, h_start, h_q;

  sha256_ctrl u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .blk_valid   (blk_valid),
    .blk_first   (blk_first),
    .blk_last    (blk_last),
    .blk_ready   (blk_ready),
    .ld_mreg     (ld_mreg),
    .upd_mreg    (upd_mreg),
    .ld_vars     (ld_vars),
    .init_hash   (init_hash),
    .rnd         (rnd),
    .rnd_idx     (rnd_idx),
    .upd_hash    (upd_hash),
    .digest_valid(digest_valid)
  );

  sha256_msg_sched u_msg_sched (
    .clk     (clk),
    .rst_n   (rst_n),
    .blk     (blk),
    .ld_mreg (ld_mreg),
    .upd_mreg(upd_mreg),
    .m0      (m0)
  );

  sha256_k_rom u_k_rom (
    .idx(rnd_idx),
    .k  (k)
  );

  sha256_compress u_compress (
    .clk  (clk),
    .rst_n(rst_n),
    .load (ld_vars),
    .h_in (h_start),
    .rnd  (rnd),
    .k    (k),
    .w    (m0),
    .vars (vars)
  );

  sha256_hash_update u_hash (
    .clk    (clk),
    .rst_n  (rst_n),
    .init   (init_hash),
    .upd    (upd_hash),
    .vars   (vars),
    .h_start(h_start),
    .digest (h_q)
  );

  assign digest = h_q;

endmodule
