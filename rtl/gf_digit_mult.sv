// gf_digit_mult: the "multiplier function" of the digit-serial multiplier, the
// carry-less product of an m-bit operand a and a G-bit digit b (no reduction).
// Output coefficient k is the XOR of the terms a[k-j] & b[j]; these terms are summed
// by a balanced binary XOR tree, so the depth is ceil(log2 G) XOR gates instead of
// G-1 in a chain (the document's critical-path idea). The tree is written as a
// function that pairs neighbours level by level. Combinational; output is m+G-1 bits.
module gf_digit_mult
  import gf163_pkg::*;
#(
  parameter int unsigned G = 41
) (
  input  gf_t              a,
  input  logic [G-1:0]     b,
  output logic [M+G-2:0]   d
);
  // Pairwise XOR reduction: level by level, element i takes v[2i] ^ v[2i+1].
  function automatic logic xor_tree(input logic [G-1:0] terms);
    logic [G-1:0] v;
    int unsigned w;
    v = terms;
    w = G;
    while (w > 1) begin
      for (int unsigned i = 0; i < w / 2; i++) v[i] = v[2*i] ^ v[2*i+1];
      if (w % 2 == 1) v[w/2] = v[w-1];
      w = (w + 1) / 2;
    end
    return v[0];
  endfunction

  // Term j of coefficient k is a[k-j] & b[j]; terms outside a are zero.
  for (genvar k = 0; k < M + G - 1; k++) begin : g_coef
    logic [G-1:0] terms;
    for (genvar j = 0; j < G; j++) begin : g_term
      if (k - j >= 0 && k - j < M) begin : g_in
        assign terms[j] = a[k-j] & b[j];
      end else begin : g_out
        assign terms[j] = 1'b0;
      end
    end
    assign d[k] = xor_tree(terms);
  end
endmodule
