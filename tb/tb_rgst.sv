// tb_rgst: self-checking testbench of the load-enable register rgst.
// Drives random load enables and data (width 32 and width 7) and checks that
// q takes d exactly when ld was high, holds otherwise, and clears on reset.
module tb_rgst;
  logic clk = 1'b0, rst_n = 1'b0;
  logic ld, ld7;
  logic [31:0] d, q, exp_q;
  logic [6:0]  d7, q7, exp7;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rgst              dut  (.clk(clk), .rst_n(rst_n), .ld(ld),  .d(d),  .q(q));
  rgst #(.W(7))     dut7 (.clk(clk), .rst_n(rst_n), .ld(ld7), .d(d7), .q(q7));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ld = 0; d = '0; ld7 = 0; d7 = '0;
    #12;
    checks++; if (q !== 32'd0 || q7 !== 7'd0) begin failures++; $display("reset value wrong"); end
    rst_n = 1'b1;
    exp_q = '0; exp7 = '0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      ld = 1'($urandom); d = $urandom; ld7 = 1'($urandom); d7 = 7'($urandom);
      if (ld)  exp_q = d;
      if (ld7) exp7  = d7;
      @(posedge clk); #1;
      checks++;
      if (q !== exp_q || q7 !== exp7) begin
        failures++;
        $display("cycle %0d: q=%h exp %h q7=%h exp %h", i, q, exp_q, q7, exp7);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
