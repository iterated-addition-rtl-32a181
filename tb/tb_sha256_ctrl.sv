// tb_sha256_ctrl: self-checking testbench of the SHA-256 sequencer.
// Offers blocks with random gaps and random first/last flags and checks,
// cycle by cycle, the load strobes in the accept cycle, 64 iteration cycles
// with rnd_idx = 0..63, one update cycle, 66 cycles per block, and
// digest_valid after a last block only.
module tb_sha256_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  logic blk_valid, blk_first, blk_last;
  logic blk_ready, ld_mreg, upd_mreg, ld_vars, init_hash, rnd, upd_hash, digest_valid;
  logic [5:0] rnd_idx;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sha256_ctrl dut (.clk(clk), .rst_n(rst_n), .blk_valid(blk_valid), .blk_first(blk_first),
                   .blk_last(blk_last), .blk_ready(blk_ready), .ld_mreg(ld_mreg),
                   .upd_mreg(upd_mreg), .ld_vars(ld_vars), .init_hash(init_hash), .rnd(rnd),
                   .rnd_idx(rnd_idx), .upd_hash(upd_hash), .digest_valid(digest_valid));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect1(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("%t %s=%b exp %b", $time, what, got, exp); end
  endtask

  initial begin
    logic exp_dv;
    blk_valid = 0; blk_first = 0; blk_last = 0;
    #12 rst_n = 1'b1;
    exp_dv = 1'b0;
    for (int b = 0; b < 40; b++) begin
      int gap;
      logic f, l;
      gap = $urandom % 4;
      f = 1'($urandom); l = 1'($urandom);
      // idle cycles: nothing but ready
      repeat (gap) begin
        @(negedge clk);
        expect1("ready(idle)", blk_ready, 1'b1);
        expect1("upd_mreg(idle)", upd_mreg, 1'b0);
        expect1("rnd(idle)", rnd, 1'b0);
        expect1("digest_valid", digest_valid, exp_dv);
      end
      @(negedge clk);
      blk_valid = 1; blk_first = f; blk_last = l; #1;
      expect1("ready", blk_ready, 1'b1);
      expect1("ld_mreg", ld_mreg, 1'b1);
      expect1("upd_mreg", upd_mreg, 1'b1);
      expect1("ld_vars", ld_vars, 1'b1);
      expect1("init_hash", init_hash, f);
      @(negedge clk);
      blk_valid = 1; blk_first = 1; blk_last = ~l;   // ignored while busy
      for (int t = 0; t < 64; t++) begin
        #1;
        expect1("rnd", rnd, 1'b1);
        expect1("ready(busy)", blk_ready, 1'b0);
        expect1("ld_mreg(busy)", ld_mreg, 1'b0);
        expect1("init(busy)", init_hash, 1'b0);
        expect1("upd_mreg", upd_mreg, 1'b1);
        checks++; if (rnd_idx !== 6'(t)) begin failures++; $display("rnd_idx=%0d exp %0d", rnd_idx, t); end
        expect1("digest_valid(busy)", digest_valid, 1'b0);
        @(negedge clk);
      end
      #1;
      expect1("upd_hash", upd_hash, 1'b1);
      expect1("rnd(update)", rnd, 1'b0);
      expect1("ready(update)", blk_ready, 1'b0);
      blk_valid = 0;
      @(negedge clk);
      exp_dv = l;
      expect1("ready(after)", blk_ready, 1'b1);
      expect1("upd_hash(after)", upd_hash, 1'b0);
      expect1("digest_valid(after)", digest_valid, exp_dv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
