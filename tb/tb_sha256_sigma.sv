// tb_sha256_sigma: self-checking testbench of the message-schedule functions
// sha256_sigma0 and sha256_sigma1. Applies corner values and random words
// and compares with a bit-by-bit reference (rotations built one bit at a
// time, shifts as concatenations).
module tb_sha256_sigma;
  import sha256_ref_pkg::*;
  logic [31:0] x, y0, y1;
  int checks = 0, failures = 0;

  sha256_sigma0 dut0 (.x(x), .y(y0));
  sha256_sigma1 dut1 (.x(x), .y(y1));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] v);
    x = v; #1;
    checks++;
    if (y0 !== ref_s0(v)) begin failures++; $display("sigma0(%h)=%h exp %h", v, y0, ref_s0(v)); end
    checks++;
    if (y1 !== ref_s1(v)) begin failures++; $display("sigma1(%h)=%h exp %h", v, y1, ref_s1(v)); end
  endtask

  initial begin
    check(32'h0000_0000);
    check(32'hffff_ffff);
    check(32'h8000_0000);
    check(32'h0000_0001);
    // sigma0(1) = bit 25 ^ bit 14 (shift drops the bit); sigma1(1) = bit 15 ^ bit 13
    x = 32'h1; #1;
    checks++; if (y0 !== 32'h0200_4000) begin failures++; $display("sigma0(1)=%h", y0); end
    checks++; if (y1 !== 32'h0000_a000) begin failures++; $display("sigma1(1)=%h", y1); end
    for (int i = 0; i < 32; i++) check(32'h1 << i);
    for (int i = 0; i < 1000; i++) check($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
