// tb_sha256_core: self-checking testbench of the SHA-256 unit.
// Hashes the standard's example messages ("abc", the empty message, the
// 56-byte two-block message) against their published digests, then random
// messages of 0..300 bytes against the reference model. Blocks are offered
// with random idle gaps, and the first block of a message can be offered
// while the previous digest is still shown. Checks 66 cycles per block
// from acceptance to digest_valid, and that the digest holds until the
// next block is taken.
module tb_sha256_core;
  import sha256_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [511:0] blk;
  logic blk_valid, blk_first, blk_last, blk_ready, digest_valid;
  logic [255:0] digest;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sha256_core dut (.clk(clk), .rst_n(rst_n), .blk(blk), .blk_valid(blk_valid),
                   .blk_first(blk_first), .blk_last(blk_last), .blk_ready(blk_ready),
                   .digest(digest), .digest_valid(digest_valid));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sends one message and returns its digest; checks the timing.
  task automatic hash_msg(input byte unsigned msg [$], output logic [255:0] dg);
    logic [511:0] blks [$];
    longint t_acc;
    ref_pad(msg, blks);
    foreach (blks[i]) begin
      repeat ($urandom % 3) @(negedge clk);
      blk = blks[i]; blk_valid = 1; blk_first = (i == 0); blk_last = (i == blks.size() - 1);
      while (!blk_ready) @(negedge clk);
      @(posedge clk);
      t_acc = $time;                 // the block is taken at this edge
      @(negedge clk); blk_valid = 0; blk = '1; blk_first = 1; blk_last = 1;
      checks++;
      if (digest_valid) begin failures++; $display("digest_valid high while busy"); end
      while (!blk_ready) @(negedge clk);
      // ready returns 65 edges after the taking edge: 66 cycles per block
      checks++;
      if (($time - t_acc - 5) / 10 != 65) begin
        failures++; $display("block took %0d cycles", ($time - t_acc - 5) / 10 + 1);
      end
      checks++;
      if (digest_valid !== (i == blks.size() - 1)) begin failures++; $display("digest_valid wrong"); end
    end
    checks++;
    if (!digest_valid) begin failures++; $display("digest_valid low after last block"); end
    dg = digest;
  endtask

  task automatic run(input byte unsigned msg [$], input logic [255:0] exp, input string name);
    logic [255:0] dg;
    hash_msg(msg, dg);
    checks++;
    if (dg !== exp) begin failures++; $display("%s: %h\n   exp %h", name, dg, exp); end
    // digest holds while idle
    repeat (3) @(negedge clk);
    checks++;
    if (digest !== exp || !digest_valid) begin failures++; $display("%s: digest not held", name); end
  endtask

  initial begin
    byte unsigned m [$];
    blk = '0; blk_valid = 0; blk_first = 0; blk_last = 0;
    #12 rst_n = 1'b1;
    str_bytes("abc", m);
    run(m, 256'hba7816bf8f01cfea414140de5dae2223b00361a396177a9cb410ff61f20015ad, "abc");
    m.delete();
    run(m, 256'he3b0c44298fc1c149afbf4c8996fb92427ae41e4649b934ca495991b7852b855, "empty");
    str_bytes("abcdbcdecdefdefgefghfghighijhijkijkljklmklmnlmnomnopnopq", m);
    run(m, 256'h248d6a61d20638b8e5c026930c3e6039a33ce45964ff2167f6ecedd419db06c1, "two-block");
    for (int r = 0; r < 25; r++) begin
      int len;
      len = (r < 5) ? 55 + r : $urandom % 300;
      m.delete();
      for (int i = 0; i < len; i++) m.push_back(8'($urandom));
      run(m, ref_hash(m), $sformatf("random len %0d", len));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
