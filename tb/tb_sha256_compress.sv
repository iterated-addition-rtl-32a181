// tb_sha256_compress: self-checking testbench of the compression function.
// Loads random hash words, then applies 64 iterations with random K and W
// (and pause cycles with rnd low) and compares a..h after every cycle with
// the reference iteration. Also checks that load wins over rnd, and one
// whole block of the standard's "abc" example against its known a..h.
module tb_sha256_compress;
  import sha256_pkg::*;
  import sha256_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic load, rnd;
  hash_t h_in, vars;
  word_t k, w;
  rhash_t exp_v;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sha256_compress dut (.clk(clk), .rst_n(rst_n), .load(load), .h_in(h_in), .rnd(rnd),
                       .k(k), .w(w), .vars(vars));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input string what);
    checks++;
    if (rhash_t'(vars) !== exp_v) begin
      failures++;
      $display("%s: vars=%h exp %h", what, vars, exp_v);
    end
  endtask

  initial begin
    load = 0; rnd = 0; h_in = '0; k = '0; w = '0;
    #12 rst_n = 1'b1;
    for (int b = 0; b < 10; b++) begin
      for (int j = 0; j < 8; j++) h_in[j] = $urandom;
      @(negedge clk); load = 1; rnd = (b % 2 == 1);   // load has priority
      @(negedge clk); load = 0; rnd = 0;
      exp_v = rhash_t'(h_in);
      cmp("load");
      for (int t = 0; t < 64; t++) begin
        k = $urandom; w = $urandom;
        rnd = (($urandom % 5) != 0);
        @(negedge clk);
        if (rnd) exp_v = ref_round(exp_v, k, w);
        rnd = 0;
        cmp("iteration");
      end
    end
    // One block of "abc": a..h after 64 iterations from the standard's example
    begin
      rword_t wv [64];
      ref_expand({32'h61626380, {14{32'h0}}, 32'h18}, wv);
      h_in = hash_t'(ref_iv());
      @(negedge clk); load = 1;
      @(negedge clk); load = 0;
      for (int t = 0; t < 64; t++) begin
        k = ref_k(t); w = wv[t]; rnd = 1;
        @(negedge clk);
      end
      rnd = 0;
      exp_v = 256'h506e3058_d39a2165_04d24d6c_b85e2ce9_5ef50f24_fb121210_948d25b6_961f4894;
      cmp("abc block");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
