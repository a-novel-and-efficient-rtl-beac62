// gf_reduce: fast reduction modulo P(x) = x^163 + x^7 + x^6 + x^3 + 1 of a polynomial
// that has EXT coefficients above degree 162 (degree <= 162+EXT).
// Each high coefficient d[163+i] is folded back onto bits i, i+3, i+6 and i+7,
// because x^163 = x^7 + x^6 + x^3 + 1. One fold is enough while 6+EXT <= 162, so
// EXT may be at most 156. The LSD multiplier uses it twice: with EXT = G for the
// A*x^G step and with EXT = G-1 for the final product. Combinational.
module gf_reduce
  import gf163_pkg::*;
#(
  parameter int unsigned EXT = 41
) (
  input  logic [M+EXT-1:0] d,
  output gf_t              c
);
  if (EXT > 156) begin : g_bad_ext
    $error("gf_reduce: EXT must not exceed 156");
  end

  always_comb begin
    c = d[M-1:0];
    for (int i = 0; i < int'(EXT); i++) begin
      c[i]      ^= d[M+i];
      c[i+TAP1] ^= d[M+i];
      c[i+TAP2] ^= d[M+i];
      c[i+TAP3] ^= d[M+i];
    end
  end
endmodule
