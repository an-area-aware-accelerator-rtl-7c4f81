// gf_ref_pkg: bit-serial reference arithmetic for the testbenches.
//
// Software models of GF(2^m) arithmetic that share no code with the RTL:
// interleaved shift-and-add multiplication modulo the NIST polynomial,
// inversion by the extended Euclidean algorithm, and affine point doubling,
// addition and left-to-right double-and-add scalar multiplication on the curve
// y^2 + xy = x^3 + x^2 + b (a = 1). Field elements are held in MAXM-bit
// vectors whose bits at and above m are zero. The reduction polynomials are
// the NIST ones: x^163+x^7+x^6+x^3+1, x^233+x^74+1, x^283+x^12+x^7+x^5+1,
// x^409+x^87+1 and x^571+x^10+x^5+x^2+1.
package gf_ref_pkg;

  localparam int MAXM = 571;
  typedef logic [MAXM-1:0] fe_t;
  typedef logic [MAXM:0]   fp_t;   // one bit more: a full polynomial

  typedef struct {
    fe_t x;
    fe_t y;
    bit  inf;
  } pt_t;

  function automatic fp_t field_poly(int m);
    fp_t f = '0;
    f[m] = 1'b1;
    f[0] = 1'b1;
    case (m)
      163: begin f[7] = 1'b1; f[6] = 1'b1; f[3] = 1'b1; end
      233: f[74] = 1'b1;
      283: begin f[12] = 1'b1; f[7] = 1'b1; f[5] = 1'b1; end
      409: f[87] = 1'b1;
      571: begin f[10] = 1'b1; f[5] = 1'b1; f[2] = 1'b1; end
      default: $fatal(1, "unsupported m");
    endcase
    return f;
  endfunction

  function automatic fe_t rand_fe(int m);
    fe_t v;
    for (int i = 0; i < MAXM; i += 32) v[i +: 32] = $urandom;
    for (int i = m; i < MAXM; i++) v[i] = 1'b0;
    return v;
  endfunction

  // a * b mod f, most significant bit of b first
  function automatic fe_t gf_mul(fe_t a, fe_t b, int m);
    fp_t f = field_poly(m);
    fp_t r = '0;
    for (int i = m - 1; i >= 0; i--) begin
      r = r << 1;
      if (r[m]) r = r ^ f;
      if (b[i]) r = r ^ fp_t'(a);
    end
    return fe_t'(r);
  endfunction

  // Carry-less product without reduction (up to 2m-1 bits).
  function automatic logic [2*MAXM-2:0] clmul(fe_t a, fe_t b, int m);
    logic [2*MAXM-2:0] r = '0;
    for (int i = 0; i < m; i++) if (b[i]) r = r ^ ((2*MAXM-1)'(a) << i);
    return r;
  endfunction

  // Long division remainder of a 2m-1 bit polynomial by f.
  function automatic fe_t poly_mod(logic [2*MAXM-2:0] c, int m);
    fp_t f = field_poly(m);
    for (int i = 2*m - 2; i >= m; i--)
      if (c[i]) c = c ^ ((2*MAXM-1)'(f) << (i - m));
    return fe_t'(c);
  endfunction

  function automatic int deg(fp_t p);
    for (int i = MAXM; i >= 0; i--) if (p[i]) return i;
    return -1;
  endfunction

  // a^-1 mod f by the extended Euclidean algorithm (a != 0)
  function automatic fe_t gf_inv(fe_t a, int m);
    fp_t u = fp_t'(a), v = field_poly(m), g1 = 1, g2 = 0, t;
    int du = deg(u), dv = m, j;
    while (du > 0) begin
      j = du - dv;
      if (j < 0) begin
        t = u; u = v; v = t;
        t = g1; g1 = g2; g2 = t;
        j = -j;
        dv = du;
      end
      u  = u ^ (v << j);
      g1 = g1 ^ (g2 << j);
      du = deg(u);
    end
    return fe_t'(g1);
  endfunction

  function automatic pt_t pt_double(pt_t p, int m);
    pt_t r;
    fe_t l;
    if (p.inf || p.x == '0) begin
      r.inf = 1; r.x = '0; r.y = '0;
      return r;
    end
    l = p.x ^ gf_mul(p.y, gf_inv(p.x, m), m);
    r.x = gf_mul(l, l, m) ^ l ^ fe_t'(1);
    r.y = gf_mul(p.x, p.x, m) ^ gf_mul(l ^ fe_t'(1), r.x, m);
    r.inf = 0;
    return r;
  endfunction

  function automatic pt_t pt_add(pt_t p, pt_t q, int m);
    pt_t r;
    fe_t l;
    if (p.inf) return q;
    if (q.inf) return p;
    if (p.x == q.x) begin
      if (p.y == q.y) return pt_double(p, m);
      r.inf = 1; r.x = '0; r.y = '0;
      return r;
    end
    l = gf_mul(p.y ^ q.y, gf_inv(p.x ^ q.x, m), m);
    r.x = gf_mul(l, l, m) ^ l ^ p.x ^ q.x ^ fe_t'(1);
    r.y = gf_mul(l, p.x ^ r.x, m) ^ r.x ^ p.y;
    r.inf = 0;
    return r;
  endfunction

  function automatic pt_t pt_mul(fe_t k, pt_t p, int m);
    pt_t q;
    q.inf = 1; q.x = '0; q.y = '0;
    for (int i = m - 1; i >= 0; i--) begin
      q = pt_double(q, m);
      if (k[i]) q = pt_add(q, p, m);
    end
    return q;
  endfunction

  // b such that (x, y) lies on y^2 + xy = x^3 + x^2 + b
  function automatic fe_t curve_b(fe_t x, fe_t y, int m);
    fe_t x2 = gf_mul(x, x, m);
    return gf_mul(y, y, m) ^ gf_mul(x, y, m) ^ gf_mul(x2, x, m) ^ x2;
  endfunction

  function automatic bit on_curve(pt_t p, fe_t b, int m);
    fe_t x2 = gf_mul(p.x, p.x, m);
    return (gf_mul(p.y, p.y, m) ^ gf_mul(p.x, p.y, m)) ==
           (gf_mul(x2, p.x, m) ^ x2 ^ b);
  endfunction

endpackage
