// sha256_ctrl: sequencer of the SHA-256 unit. It runs, for every block, the
// load, the 64 iterations and the hash update, and handles the block
// handshake.
//
// States: IDLE waits for a block (blk_ready = 1). The cycle in which
// blk_valid and blk_ready are both high is the load cycle: ld_mreg,
// upd_mreg and ld_vars are high, and init_hash is high if blk_first marks
// the start of a new message. ROUND then lasts 64 cycles with rnd and
// upd_mreg high and rnd_idx = i counting 0..63. UPDATE is one cycle with
// upd_hash high. Back in IDLE, digest_valid is high if the block just
// finished carried blk_last, and stays high until the next block is
// accepted. A block therefore occupies 66 cycles: blk_ready and
// digest_valid return 65 clock edges after the edge that took the block.
// Two assertions state the sequencing rules. The loop structure follows the
// SHA-256 procedure; the handshake and the cycle split are this design's
// own.
module sha256_ctrl (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       blk_valid,
  input  logic       blk_first,
  input  logic       blk_last,
  output logic       blk_ready,
  output logic       ld_mreg,
  output logic       upd_mreg,
  output logic       ld_vars,
  output logic       init_hash,
  output logic       rnd,
  output logic [5:0] rnd_idx,
  output logic       upd_hash,
  output logic       digest_valid
);

  typedef enum logic [1:0] {S_IDLE, S_ROUND, S_UPDATE} state_t;

  state_t     state;
  logic [5:0] cnt;
  logic       last_q;
  logic       accept;

  assign blk_ready = (state == S_IDLE);
  assign accept    = blk_ready && blk_valid;

  assign ld_mreg   = accept;
  assign ld_vars   = accept;
  assign init_hash = accept && blk_first;
  assign rnd       = (state == S_ROUND);
  assign upd_mreg  = accept || rnd;
  assign rnd_idx   = cnt;
  assign upd_hash  = (state == S_UPDATE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      cnt          <= '0;
      last_q       <= 1'b0;
      digest_valid <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (accept) begin
          state        <= S_ROUND;
          cnt          <= '0;
          last_q       <= blk_last;
          digest_valid <= 1'b0;
        end
        S_ROUND: begin
          cnt <= cnt + 6'd1;
          if (cnt == 6'd63) state <= S_UPDATE;
        end
        S_UPDATE: begin
          state        <= S_IDLE;
          digest_valid <= last_q;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Sequencing rules: a block is taken only while no iteration or update is
  // running, and the hash update follows exactly the 64th iteration.
  a_ready_idle: assert property (@(posedge clk) disable iff (!rst_n)
    blk_ready |-> !rnd && !upd_hash);
  a_update_after_last: assert property (@(posedge clk) disable iff (!rst_n)
    (rnd && rnd_idx == 6'd63) |=> upd_hash);

endmodule
