// tb_sha256_k_rom: self-checking testbench of the round-constant table.
// Every K(i) is compared with the value computed from its definition (the
// fractional part of the cube root of the (i+1)-th prime), and K(0), K(1),
// K(2), K(63) also with literal values.
module tb_sha256_k_rom;
  import sha256_ref_pkg::*;
  logic [5:0]  idx;
  logic [31:0] k;
  int checks = 0, failures = 0;

  sha256_k_rom dut (.idx(idx), .k(k));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      idx = 6'(i); #1;
      checks++;
      if (k !== ref_k(i)) begin failures++; $display("K(%0d)=%h exp %h", i, k, ref_k(i)); end
    end
    idx = 6'd0;  #1; checks++; if (k !== 32'h428a2f98) failures++;
    idx = 6'd1;  #1; checks++; if (k !== 32'h71374491) failures++;
    idx = 6'd2;  #1; checks++; if (k !== 32'hb5c0fbcf) failures++;
    idx = 6'd63; #1; checks++; if (k !== 32'hc67178f2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
