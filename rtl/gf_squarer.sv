// gf_squarer: combinational GF(2^163) squarer, c = a^2 mod P(x).
// Squaring in a binary field only moves bit i of the operand to bit 2i and then
// reduces the 325-bit result with the pentanomial taps, so the unit is a net of XOR
// gates with no multiplexer in front of it. The design instantiates one squarer per
// value to be squared, as the document does, instead of sharing one behind a
// multiplexer. How the reduction is arranged is this design's choice (gf_square()
// in gf163_pkg). Purely combinational: no clock, no latency.
module gf_squarer
  import gf163_pkg::*;
(
  input  gf_t a,
  output gf_t c
);
  always_comb c = gf_square(a);
endmodule
