// sha256_msg_sched: SHA-256 message schedule. It turns the 16 words of a
// 512-bit block into the 64 words W_0..W_63, one per clock cycle.
//
// Sixteen 32-bit registers M_0..M_15 (rgst instances) form a shift chain.
// In front of each register a 2-input multiplexer picks either the block
// slice for that word (ld_mreg = 1; M_0 gets blk[511:480], M_15 blk[31:0])
// or the word from the next less significant register (ld_mreg = 0), and
// for M_15 the newly built word
//     NEW_WORD = sigma1(M_14) + M_9 + sigma0(M_1) + M_0   (mod 2^32).
// upd_mreg is the load enable of all sixteen registers, so loading a block
// needs ld_mreg and upd_mreg both high, and each cycle with only upd_mreg
// high is one iteration. m0 is register M_0: after the load it is W_0 and
// after iteration t it is W_(t+1). The structure (register chain, muxes,
// sigma blocks, one 4-input adder) follows the standard datapath drawing;
// the reset of the registers is this design's choice.
module sha256_msg_sched
  import sha256_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic [511:0] blk,
  input  logic         ld_mreg,
  input  logic         upd_mreg,
  output word_t        m0
);

  word_t m_q [16];   // register outputs M_0..M_15
  word_t m_d [16];   // multiplexer outputs
  word_t s0, s1, new_word;

  sha256_sigma0 u_sigma0 (.x(m_q[1]),  .y(s0));
  sha256_sigma1 u_sigma1 (.x(m_q[14]), .y(s1));

  // Multi-operand adder for the next word.
  assign new_word = s1 + m_q[9] + s0 + m_q[0];

  for (genvar i = 0; i < 16; i++) begin : g_word
    if (i == 15) begin : g_last
      assign m_d[i] = ld_mreg ? blk[31:0] : new_word;
    end else begin : g_mid
      assign m_d[i] = ld_mreg ? blk[511 - 32*i -: 32] : m_q[i+1];
    end
    rgst #(.W(32)) u_reg (
      .clk  (clk),
      .rst_n(rst_n),
      .ld   (upd_mreg),
      .d    (m_d[i]),
      .q    (m_q[i])
    );
  end

  assign m0 = m_q[0];

endmodule
