// gf_ref_pkg: reference arithmetic for the testbenches, written independently of the
// RTL: bit-serial shift-and-add field multiplication with interleaved reduction,
// Fermat inversion, a half-trace quadratic solver, and affine elliptic-curve point
// addition, doubling and double-and-add scalar multiplication over GF(2^163),
// P(x) = x^163 + x^7 + x^6 + x^3 + 1, curve y^2 + xy = x^3 + a x^2 + b.
package gf_ref_pkg;

  typedef logic [162:0] fe_t;

  typedef struct packed {
    logic inf;
    fe_t  x;
    fe_t  y;
  } pt_t;

  // NIST B-163 and K-163 (a = 1 for both) from FIPS 186-2.
  localparam fe_t B163_B  = 163'h2_0A601907_B8C953CA_1481EB10_512F7874_4A3205FD;
  localparam fe_t B163_GX = 163'h3_F0EBA162_86A2D57E_A0991168_D4994637_E8343E36;
  localparam fe_t B163_GY = 163'h0_D51FBC6C_71A0094F_A2CDD545_B11C5C0C_797324F1;
  localparam fe_t K163_GX = 163'h2_FE13C053_7BBC11AC_AA07D793_DE4E6D5E_5C94EEE8;
  localparam fe_t K163_GY = 163'h2_89070FB0_5D38FF58_321F2E80_0536D538_CCDAA3D9;

  // x * alpha mod P
  function automatic fe_t mulx(input fe_t a);
    logic top;
    fe_t r;
    top = a[162];
    r = a << 1;
    if (top) r ^= 163'h c9;   // x^7 + x^6 + x^3 + 1
    return r;
  endfunction

  function automatic fe_t fmul(input fe_t a, input fe_t b);
    fe_t r, s;
    r = '0;
    s = a;
    for (int i = 0; i < 163; i++) begin
      if (b[i]) r ^= s;
      s = mulx(s);
    end
    return r;
  endfunction

  function automatic fe_t fsq(input fe_t a);
    return fmul(a, a);
  endfunction

  // a^(2^163 - 2) = a^-1, by square-and-multiply over the exponent bits 1..162.
  function automatic fe_t finv(input fe_t a);
    fe_t r, p;
    r = 163'd1;
    p = a;
    for (int i = 1; i < 163; i++) begin
      p = fsq(p);
      r = fmul(r, p);
    end
    return r;
  endfunction

  // Carry-less product, no reduction.
  function automatic logic [324:0] clmul(input fe_t a, input fe_t b);
    logic [324:0] r;
    r = '0;
    for (int i = 0; i < 163; i++) if (b[i]) r ^= (325'(a) << i);
    return r;
  endfunction

  // Reduce any polynomial of degree < 325 by long division.
  function automatic fe_t fmod(input logic [324:0] d);
    logic [324:0] t;
    t = d;
    for (int i = 324; i >= 163; i--)
      if (t[i]) t ^= (325'h8_0000_0000_0000_0000_0000_0000_0000_0000_0000_00c9 << (i - 163));
    return t[162:0];
  endfunction

  // Half-trace: a solution z of z^2 + z = c when Tr(c) = 0 (m odd).
  function automatic fe_t fhalftrace(input fe_t c);
    fe_t z, t;
    z = '0;
    t = c;
    for (int i = 0; i <= 81; i++) begin
      z ^= t;
      t = fsq(fsq(t));
    end
    return z;
  endfunction

  function automatic logic on_curve(input pt_t p, input fe_t a, input fe_t b);
    fe_t lhs, rhs, x2;
    if (p.inf) return 1'b1;
    x2  = fsq(p.x);
    lhs = fsq(p.y) ^ fmul(p.x, p.y);
    rhs = fmul(x2, p.x) ^ fmul(a, x2) ^ b;
    return lhs == rhs;
  endfunction

  // A point with x-coordinate derived from seed (the next x whose equation is solvable).
  function automatic pt_t point_from_seed(input fe_t seed, input fe_t a, input fe_t b);
    pt_t p;
    fe_t x, c, z;
    x = seed;
    forever begin
      if (x != '0) begin
        // y = x z, z^2 + z = x + a + b / x^2
        c = x ^ a ^ fmul(b, fsq(finv(x)));
        z = fhalftrace(c);
        if ((fsq(z) ^ z) == c) begin
          p.inf = 1'b0;
          p.x   = x;
          p.y   = fmul(x, z);
          return p;
        end
      end
      x = x + 1'b1;
    end
  endfunction

  function automatic pt_t pt_neg(input pt_t p);
    pt_t r;
    r = p;
    r.y = p.x ^ p.y;
    return r;
  endfunction

  function automatic pt_t pt_dbl(input pt_t p, input fe_t a);
    pt_t r;
    fe_t l;
    if (p.inf || p.x == '0) begin
      r.inf = 1'b1; r.x = '0; r.y = '0;
      return r;
    end
    l = p.x ^ fmul(p.y, finv(p.x));
    r.inf = 1'b0;
    r.x = fsq(l) ^ l ^ a;
    r.y = fsq(p.x) ^ fmul(l ^ 163'd1, r.x);
    return r;
  endfunction

  function automatic pt_t pt_add(input pt_t p, input pt_t q, input fe_t a);
    pt_t r;
    fe_t l;
    if (p.inf) return q;
    if (q.inf) return p;
    if (p.x == q.x) begin
      if (p.y == q.y) return pt_dbl(p, a);
      r.inf = 1'b1; r.x = '0; r.y = '0;
      return r;
    end
    l = fmul(p.y ^ q.y, finv(p.x ^ q.x));
    r.inf = 1'b0;
    r.x = fsq(l) ^ l ^ p.x ^ q.x ^ a;
    r.y = fmul(l, p.x ^ r.x) ^ r.x ^ p.y;
    return r;
  endfunction

  // Left-to-right double-and-add over nbits bits of k.
  function automatic pt_t pt_mul(input logic [162:0] k, input pt_t p, input fe_t a);
    pt_t r;
    r.inf = 1'b1; r.x = '0; r.y = '0;
    for (int i = 162; i >= 0; i--) begin
      r = pt_dbl(r, a);
      if (k[i]) r = pt_add(r, p, a);
    end
    return r;
  endfunction

  function automatic fe_t rand_fe();
    fe_t r;
    r = '0;
    for (int i = 0; i < 6; i++) r = {r[130:0], 32'($urandom)};
    return r;
  endfunction

endpackage
