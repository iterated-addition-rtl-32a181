// rgst: W-bit register with load enable, the storage element the message
// schedule is built from (one per word M_0..M_15).
//
// q takes d on the rising clock edge when ld is high and holds otherwise.
// rst_n is an asynchronous, active-low reset that clears q to 0. The
// register's pins d and q and its load input follow the SHA-256 datapath
// drawing; its width default of 32 is the word size; the reset is this
// design's own choice.
module rgst #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ld,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (ld) q <= d;
  end

endmodule
