// gf163_pkg: types and constants shared by the GF(2^163) scalar point multiplier.
// The field is GF(2^163) in polynomial basis, generated by the NIST pentanomial
// P(x) = x^163 + x^7 + x^6 + x^3 + 1. An element is a 163-bit vector, bit i being the
// coefficient of x^i. Field addition is a plain XOR and needs no unit of its own.
// gf_square() is the combinational squaring used by every squarer: the bits of the
// operand are spread to the even positions of a 325-bit word, which is then folded
// back with the pentanomial taps (two folds reach degree < 163).
package gf163_pkg;

  localparam int unsigned M = 163;

  typedef logic [M-1:0] gf_t;

  // Exponents of the low terms of P(x); x^163 = x^7 + x^6 + x^3 + 1.
  localparam int unsigned TAP1 = 3;
  localparam int unsigned TAP2 = 6;
  localparam int unsigned TAP3 = 7;

  localparam gf_t GF_ZERO = '0;
  localparam gf_t GF_ONE  = gf_t'(1);

  // Reduce a polynomial of degree <= 2M-2 modulo P(x), top coefficient first.
  function automatic gf_t gf_reduce_wide(input logic [2*M-2:0] d);
    logic [2*M-2:0] t;
    t = d;
    for (int i = 2*M-2; i >= M; i--) begin
      if (t[i]) begin
        t[i]             = 1'b0;
        t[i-M]           = ~t[i-M];
        t[i-M+TAP1]      = ~t[i-M+TAP1];
        t[i-M+TAP2]      = ~t[i-M+TAP2];
        t[i-M+TAP3]      = ~t[i-M+TAP3];
      end
    end
    return t[M-1:0];
  endfunction

  // a^2 mod P(x): squaring in GF(2^m) is linear, a spread of the bits then a reduction.
  function automatic gf_t gf_square(input gf_t a);
    logic [2*M-2:0] s;
    s = '0;
    for (int i = 0; i < M; i++) s[2*i] = a[i];
    return gf_reduce_wide(s);
  endfunction

endpackage
