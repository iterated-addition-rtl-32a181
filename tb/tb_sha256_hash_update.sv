// tb_sha256_hash_update: self-checking testbench of the hash registers.
// Checks the reset and init values against the values computed from the
// square roots of the first eight primes, the h_start bypass during init,
// and random sequences of init and update cycles against a word-wise
// modular-sum model.
module tb_sha256_hash_update;
  import sha256_pkg::*;
  import sha256_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic init, upd;
  hash_t vars, h_start, digest;
  rhash_t exp_h;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sha256_hash_update dut (.clk(clk), .rst_n(rst_n), .init(init), .upd(upd), .vars(vars),
                          .h_start(h_start), .digest(digest));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init = 0; upd = 0; vars = '0;
    #12 rst_n = 1'b1;
    exp_h = ref_iv();
    checks++; if (rhash_t'(digest) !== exp_h) begin failures++; $display("reset value %h", digest); end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      for (int j = 0; j < 8; j++) vars[j] = $urandom;
      init = (($urandom % 8) == 0);
      upd  = 1'($urandom);
      #1;
      checks++;
      if (rhash_t'(h_start) !== (init ? ref_iv() : exp_h)) begin
        failures++; $display("h_start=%h", h_start);
      end
      if (init) exp_h = ref_iv();
      else if (upd)
        for (int j = 0; j < 8; j++)
          exp_h[255 - 32*j -: 32] = exp_h[255 - 32*j -: 32] + vars[7 - j];
      @(posedge clk); #1;
      checks++;
      if (rhash_t'(digest) !== exp_h) begin failures++; $display("cycle %0d: H=%h exp %h", i, digest, exp_h); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
