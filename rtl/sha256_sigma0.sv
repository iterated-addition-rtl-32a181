// sha256_sigma0: the message-schedule function sigma0, applied to word M_1.
//
// y = ROTR7(x) xor ROTR18(x) xor SHR3(x), where ROTR rotates right and SHR
// shifts right filling with zeros. Purely combinational: wiring and one
// layer of 3-input XOR gates.
module sha256_sigma0
  import sha256_pkg::*;
(
  input  word_t x,
  output word_t y
);

  assign y = small_sigma0(x);

endmodule
