// tb_multi_operand_acc: self-checking testbench of the sequential
// multi-operand adder. Feeds random operand streams of random length, each
// started with clr, and checks after every cycle that A equals the sum, mod
// 2^W, of the operands presented from the clr cycle on, two cycles earlier
// (W = 32 and W = 8, the latter to make wrap-around frequent).
module tb_multi_operand_acc;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clr;
  logic [31:0] x, a;
  logic [7:0]  x8, a8;
  int checks = 0, failures = 0, wraps = 0;

  always #5 clk = ~clk;

  multi_operand_acc              dut  (.clk(clk), .rst_n(rst_n), .clr(clr), .x_in(x),  .a_out(a));
  multi_operand_acc #(.W(8))     dut8 (.clk(clk), .rst_n(rst_n), .clr(clr), .x_in(x8), .a_out(a8));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned sum;   // exact sum of operands
    logic [31:0] ops [$];
    clr = 0; x = '0; x8 = '0;
    #12;
    checks++; if (a !== 0 || a8 !== 0) begin failures++; $display("reset"); end
    rst_n = 1'b1;
    for (int s = 0; s < 50; s++) begin
      int n;
      n = 1 + $urandom % 40;
      ops.delete();
      for (int i = 0; i < n; i++) ops.push_back((s % 3 == 0) ? 32'hffff_fff0 + $urandom % 16 : $urandom);
      for (int i = 0; i <= n; i++) begin
        @(negedge clk);
        clr = (i == 0);
        x   = (i < n) ? ops[i] : $urandom;   // the value after the stream belongs to no sum checked
        x8  = x[7:0];
        @(posedge clk); #1;
        // after edge c0+i+1, A holds the sum of operands 0..i-1
        sum = 0;
        for (int j = 0; j < i && j < n; j++) sum += 64'(ops[j]);
        if (i >= 1) begin
          checks++;
          if (a !== sum[31:0]) begin failures++; $display("s%0d i%0d A=%h exp %h", s, i, a, sum[31:0]); end
          checks++;
          if (a8 !== sum[7:0]) begin failures++; $display("s%0d i%0d A8=%h exp %h", s, i, a8, sum[7:0]); end
          if (sum > 64'hffff_ffff) wraps++;
        end
      end
    end
    checks++; if (wraps == 0) begin failures++; $display("no wrap-around exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
