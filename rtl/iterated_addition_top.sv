// iterated_addition_top: two iterated (multi-cycle) datapaths side by side.
//
// acc_*: the sequential multi-operand adder (multi_operand_acc), which adds
// one operand per cycle into an accumulator. sha_*: the SHA-256 unit
// (sha256_core), which hashes padded 512-bit blocks in 66 cycles each. The
// two share only clock and reset; see each module for its timing.
module iterated_addition_top #(
  parameter int unsigned ACC_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  // multi-operand adder
  input  logic             acc_clr,
  input  logic [ACC_W-1:0] acc_x,
  output logic [ACC_W-1:0] acc_a,
  // SHA-256 unit
  input  logic [511:0]     sha_blk,
  input  logic             sha_blk_valid,
  input  logic             sha_blk_first,
  input  logic             sha_blk_last,
  output logic             sha_blk_ready,
  output logic [255:0]     sha_digest,
  output logic             sha_digest_valid
);

  multi_operand_acc #(.W(ACC_W)) u_acc (
    .clk  (clk),
    .rst_n(rst_n),
    .clr  (acc_clr),
    .x_in (acc_x),
    .a_out(acc_a)
  );

  sha256_core u_sha (
    .clk         (clk),
    .rst_n       (rst_n),
    .blk         (sha_blk),
    .blk_valid   (sha_blk_valid),
    .blk_first   (sha_blk_first),
    .blk_last    (sha_blk_last),
    .blk_ready   (sha_blk_ready),
    .digest      (sha_digest),
    .digest_valid(sha_digest_valid)
  );

endmodule
