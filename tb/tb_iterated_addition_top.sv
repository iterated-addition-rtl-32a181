// tb_iterated_addition_top: end-to-end testbench of the whole design at its
// default parameters. Runs both datapaths at once: the accumulator sums
// operand streams (each started with a clear) while the SHA-256 unit hashes
// the standard's "abc" example and random one- and multi-block messages.
// Results are compared with independent models (running sums, the
// reference SHA-256). It also counts how often each mechanism occurred:
// accumulator clear, accumulator wrap-around, block taken while the unit
// was busy (back-pressure), first block (hash initialisation), later block
// (hash chaining), iteration cycles, hash updates, digests delivered; any
// mechanism that never occurred counts as a failure.
module tb_iterated_addition_top;
  import sha256_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic        acc_clr;
  logic [31:0] acc_x, acc_a;
  logic [511:0] sha_blk;
  logic sha_blk_valid, sha_blk_first, sha_blk_last, sha_blk_ready, sha_digest_valid;
  logic [255:0] sha_digest;
  int checks = 0, failures = 0;
  int n_clr = 0, n_wrap = 0, n_stall = 0, n_first = 0, n_chain = 0;
  int n_iter = 0, n_upd = 0, n_digest = 0;
  bit acc_done = 0, sha_done = 0;

  always #5 clk = ~clk;

  iterated_addition_top dut (
    .clk(clk), .rst_n(rst_n),
    .acc_clr(acc_clr), .acc_x(acc_x), .acc_a(acc_a),
    .sha_blk(sha_blk), .sha_blk_valid(sha_blk_valid), .sha_blk_first(sha_blk_first),
    .sha_blk_last(sha_blk_last), .sha_blk_ready(sha_blk_ready),
    .sha_digest(sha_digest), .sha_digest_valid(sha_digest_valid));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters, sampled before each rising edge.
  always @(negedge clk) if (rst_n) begin
    #1;
    if (sha_blk_valid && !sha_blk_ready) n_stall++;
    if (sha_blk_valid && sha_blk_ready && sha_blk_first) n_first++;
    if (sha_blk_valid && sha_blk_ready && !sha_blk_first) n_chain++;
    if (dut.u_sha.rnd) n_iter++;
    if (dut.u_sha.upd_hash) n_upd++;
  end

  // Accumulator stream driver and checker.
  initial begin
    longint unsigned sum;
    logic [31:0] ops [$];
    acc_clr = 0; acc_x = '0;
    @(posedge rst_n);
    for (int s = 0; s < 40; s++) begin
      int n;
      n = 1 + $urandom % 30;
      ops.delete();
      for (int i = 0; i < n; i++) ops.push_back((s % 4 == 1) ? 32'hf000_0000 | $urandom : $urandom % 1000);
      for (int i = 0; i <= n; i++) begin
        @(negedge clk);
        acc_clr = (i == 0);
        acc_x   = (i < n) ? ops[i] : 32'hdead_beef;
        if (i == 0) n_clr++;
        @(posedge clk); #1;
        sum = 0;
        for (int j = 0; j < i; j++) sum += 64'(ops[j]);
        if (i >= 1) begin
          checks++;
          if (acc_a !== sum[31:0]) begin failures++; $display("acc s%0d i%0d %h exp %h", s, i, acc_a, sum[31:0]); end
          if (sum > 64'hffff_ffff) n_wrap++;
        end
      end
    end
    acc_done = 1;
  end

  // SHA-256 driver: the next block is offered right after the previous one
  // was taken, so it waits through the 66-cycle computation.
  initial begin
    byte unsigned m [$];
    logic [511:0] blks [$];
    logic [255:0] exp;
    sha_blk = '0; sha_blk_valid = 0; sha_blk_first = 0; sha_blk_last = 0;
    #12 rst_n = 1'b1;
    for (int r = 0; r < 12; r++) begin
      if (r == 0) str_bytes("abc", m);
      else begin
        int len;
        len = (r % 3 == 0) ? 120 + $urandom % 200 : $urandom % 60;
        m.delete();
        for (int i = 0; i < len; i++) m.push_back(8'($urandom));
      end
      exp = (r == 0) ? 256'hba7816bf8f01cfea414140de5dae2223b00361a396177a9cb410ff61f20015ad
                     : ref_hash(m);
      ref_pad(m, blks);
      foreach (blks[i]) begin
        @(negedge clk);
        sha_blk = blks[i]; sha_blk_valid = 1;
        sha_blk_first = (i == 0); sha_blk_last = (i == blks.size() - 1);
        while (!sha_blk_ready) @(negedge clk);
        @(negedge clk);
        sha_blk_valid = 0;
      end
      while (!sha_blk_ready) @(negedge clk);
      checks++;
      if (!sha_digest_valid || sha_digest !== exp) begin
        failures++; $display("sha msg %0d: %h\n   exp %h", r, sha_digest, exp);
      end else n_digest++;
    end
    sha_done = 1;
  end

  initial begin
    wait (acc_done && sha_done);
    $display("mechanisms: clr=%0d wrap=%0d stall=%0d first=%0d chain=%0d iter=%0d upd=%0d digest=%0d",
             n_clr, n_wrap, n_stall, n_first, n_chain, n_iter, n_upd, n_digest);
    checks++; if (n_clr == 0)    begin failures++; $display("no accumulator clear"); end
    checks++; if (n_wrap == 0)   begin failures++; $display("no accumulator wrap-around"); end
    checks++; if (n_stall == 0)  begin failures++; $display("no back-pressure"); end
    checks++; if (n_first == 0)  begin failures++; $display("no first block"); end
    checks++; if (n_chain == 0)  begin failures++; $display("no chained block"); end
    checks++; if (n_iter != 64 * (n_first + n_chain)) begin failures++; $display("iteration count %0d", n_iter); end
    checks++; if (n_upd != n_first + n_chain) begin failures++; $display("update count %0d", n_upd); end
    checks++; if (n_digest == 0) begin failures++; $display("no digest"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
