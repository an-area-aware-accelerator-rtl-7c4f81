// gf2m_nist_reduce: reduction of a 2m-1 bit polynomial product modulo the
// NIST polynomial f(x) = x^m + r(x).
//
// It uses x^m = r(x) (mod f): the upper part H(x) of the product (the
// coefficients of x^m and above) is folded back as H(x)*r(x) onto the lower
// part. Because r(x) is a trinomial or pentanomial tail whose degree is below
// m/2 for every NIST field, H(x)*r(x) is a handful of shifted copies of H(x)
// and two folds leave a polynomial of degree below m. This is the
// shift-and-XOR form of the NIST fast reduction; the field polynomials are the
// standard NIST ones for m = 163, 233, 283, 409 and 571. Purely
// combinational.
module gf2m_nist_reduce
  import ecc_pkg::*;
#(
  parameter int unsigned M = 571  // field size m (a NIST size)
) (
  input  logic [2*M-2:0] c,   // unreduced product
  output logic [M-1:0]   r    // c mod f(x)
);
  localparam int T0 = nist_term(M, 0);
  localparam int T1 = nist_term(M, 1);
  localparam int T2 = nist_term(M, 2);
  localparam int T3 = nist_term(M, 3);
  localparam int TERMS [4] = '{T0, T1, T2, T3};

  if (!nist_m_ok(M)) begin : g_bad_m
    $error("gf2m_nist_reduce: M must be a NIST binary field size");
  end

  localparam int unsigned W = 2*M - 1;

  logic [W-1:0] hi1, t1, hi2;
  logic [M-1:0] t2;

  always_comb begin
    // first fold: bits m .. 2m-2
    hi1 = W'(c[2*M-2:M]);
    t1  = W'(c[M-1:0]);
    for (int i = 0; i < 4; i++) begin
      if (TERMS[i] >= 0) t1 = t1 ^ (hi1 << TERMS[i]);
    end
    // second fold: what the first one pushed to degree m and above
    hi2 = W'(t1[W-1:M]);
    t2  = t1[M-1:0];
    for (int i = 0; i < 4; i++) begin
      if (TERMS[i] >= 0) t2 = t2 ^ M'(hi2 << TERMS[i]);
    end
    r = t2;
  end
endmodule
