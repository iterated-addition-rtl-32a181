// tb_sha256_msg_sched: self-checking testbench of the message schedule.
// Loads random blocks (ld_mreg and upd_mreg high), checks m0 = W_0, then runs
// 64 iterations, with random pause cycles (upd_mreg low) in between, and
// checks after each that m0 is the next word of the reference expansion
// W_0..W_63, and that a pause holds the value. Counts the cycles from load
// to W_63.
module tb_sha256_msg_sched;
  import sha256_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [511:0] blk;
  logic ld_mreg, upd_mreg;
  logic [31:0] m0;
  rword_t w [64];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sha256_msg_sched dut (.clk(clk), .rst_n(rst_n), .blk(blk), .ld_mreg(ld_mreg),
                        .upd_mreg(upd_mreg), .m0(m0));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ld_mreg = 0; upd_mreg = 0; blk = '0;
    #12 rst_n = 1'b1;
    for (int b = 0; b < 20; b++) begin
      int iters;
      for (int i = 0; i < 16; i++) blk[32*i +: 32] = $urandom;
      if (b == 0) blk = {32'h61626380, {14{32'h0}}, 32'h18};   // "abc" padded
      ref_expand(blk, w);
      @(negedge clk); ld_mreg = 1; upd_mreg = 1;
      @(negedge clk); ld_mreg = 0; upd_mreg = 0;
      blk = ~blk;   // must no longer matter
      checks++; if (m0 !== w[0]) begin failures++; $display("blk %0d W0=%h exp %h", b, m0, w[0]); end
      iters = 0;
      for (int t = 1; t < 64; t++) begin
        if (b > 0 && ($urandom % 4) == 0) begin
          @(negedge clk);   // pause: upd_mreg low
          checks++; if (m0 !== w[t-1]) begin failures++; $display("hold failed"); end
        end
        upd_mreg = 1;
        @(negedge clk); upd_mreg = 0;
        iters++;
        checks++;
        if (m0 !== w[t]) begin failures++; $display("blk %0d W%0d=%h exp %h", b, t, m0, w[t]); end
      end
      checks++; if (iters != 63) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
