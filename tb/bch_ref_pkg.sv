// bch_ref_pkg: reference arithmetic for the BCH testbenches.
//
// Everything here works in the binary-vector form only (shift-and-add field
// multiplication, direct polynomial products and long division), so the
// expected values do not share the power-of-alpha tables or the bit-per-power
// coefficient format of the design under test. Polynomials over GF(2) are
// bit vectors with bit i the coefficient of x^i.
package bch_ref_pkg;

  typedef bit [1023:0] bigpoly_t;

  // a*b in GF(2^m) modulo the primitive polynomial prim.
  function automatic int unsigned gf_mul(input int unsigned a, input int unsigned b,
                                         input int unsigned m, input int unsigned prim);
    int unsigned r = 0;
    for (int i = m - 1; i >= 0; i--) begin
      r = r << 1;
      if ((r & (1 << m)) != 0) r = r ^ prim;
      if ((b & (1 << i)) != 0) r = r ^ a;
    end
    return r;
  endfunction

  // alpha^e as a binary vector.
  function automatic int unsigned gf_exp(input int unsigned e, input int unsigned m,
                                         input int unsigned prim);
    int unsigned r = 1;
    for (int unsigned i = 0; i < e; i++) r = gf_mul(r, 2, m, prim);
    return r;
  endfunction

  // Power of alpha of a non-zero element (by exhaustive search).
  function automatic int unsigned gf_log(input int unsigned v, input int unsigned m,
                                         input int unsigned prim);
    int unsigned r = 1;
    for (int unsigned i = 0; i < (1 << m) - 1; i++) begin
      if (r == v) return i;
      r = gf_mul(r, 2, m, prim);
    end
    return 'hFFFF_FFFF;
  endfunction

  // Minimal polynomial of alpha^i: multiply out (x + beta) for beta = alpha^i,
  // alpha^2i, ... with GF(2^m) coefficients until beta repeats.
  function automatic int unsigned minpoly(input int unsigned i, input int unsigned m,
                                          input int unsigned prim);
    int unsigned c [0:32];
    int unsigned beta, b0, d, res;
    for (int k = 0; k <= 32; k++) c[k] = 0;
    c[0] = 1;
    d = 0;
    b0 = gf_exp(i % ((1 << m) - 1), m, prim);
    beta = b0;
    do begin
      // c(x) = c(x) * (x + beta)
      for (int k = d + 1; k >= 1; k--) c[k] = c[k-1] ^ gf_mul(c[k], beta, m, prim);
      c[0] = gf_mul(c[0], beta, m, prim);
      d++;
      beta = gf_mul(beta, beta, m, prim);
    end while (beta != b0);
    res = 0;
    for (int k = 0; k <= d; k++) begin
      if (c[k] > 1) $display("REF: non-binary minimal polynomial coefficient");
      if (c[k] == 1) res = res | (1 << k);
    end
    return res;
  endfunction

  function automatic int deg(input bigpoly_t p);
    for (int i = 1023; i >= 0; i--) if (p[i]) return i;
    return -1;
  endfunction

  // Carry-less product.
  function automatic bigpoly_t pmul(input bigpoly_t a, input bigpoly_t b);
    bigpoly_t r = '0;
    for (int i = 0; i <= deg(b); i++) if (b[i]) r = r ^ (a << i);
    return r;
  endfunction

  // Remainder of a divided by b (b non-zero).
  function automatic bigpoly_t pmod(input bigpoly_t a, input bigpoly_t b);
    int db = deg(b);
    for (int i = deg(a); i >= db; i--) if (a[i]) a = a ^ (b << (i - db));
    return a;
  endfunction

  // Evaluate a binary polynomial p at alpha^e, returned as a binary vector.
  function automatic int unsigned peval(input bigpoly_t p, input int unsigned e,
                                        input int unsigned m, input int unsigned prim);
    int unsigned r = 0, x, pw;
    x = gf_exp(e % ((1 << m) - 1), m, prim);
    pw = 1;
    for (int i = 0; i <= deg(p); i++) begin
      if (p[i]) r = r ^ pw;
      pw = gf_mul(pw, x, m, prim);
    end
    return r;
  endfunction

endpackage
