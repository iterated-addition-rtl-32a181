// multi_operand_acc: sequential multi-operand adder. It sums a stream of
// operands, one per clock cycle, into an accumulator.
//
// An input register X takes the operand x_in on every clock edge; an adder
// adds X to the accumulator register A, whose output is fed back to the
// adder: A <- A + X every cycle (mod 2^W). clr (synchronous) performs
// A <- 0 and starts a new sum. Timing: an operand presented in cycle c is in
// X after edge c+1 and in A after edge c+2; with clr high in cycle c0 and
// operands x_0..x_(n-1) presented in cycles c0..c0+n-1, a_out equals their
// sum after edge c0+n+1. rst_n (asynchronous, active low) clears both
// registers. The X register, adder and fed-back A register are the
// structure of the iterated-addition drawing; the width, clr and reset are
// this design's choices.
module multi_operand_acc #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic [W-1:0] x_in,
  output logic [W-1:0] a_out
);

  logic [W-1:0] x_q, a_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= '0;
      a_q <= '0;
    end else begin
      x_q <= x_in;
      a_q <= clr ? '0 : a_q + x_q;
    end
  end

  assign a_out = a_q;

endmodule
