// sha256_sigma1: the message-schedule function sigma1, applied to word M_14.
//
// y = ROTR17(x) xor ROTR19(x) xor SHR10(x), where ROTR rotates right and SHR
// shifts right filling with zeros. Purely combinational: wiring and one
// layer of 3-input XOR gates.
module sha256_sigma1
  import sha256_pkg::*;
(
  input  word_t x,
  output word_t y
);

  assign y = small_sigma1(x);

endmodule
