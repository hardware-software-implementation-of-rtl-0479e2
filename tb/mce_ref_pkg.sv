// mce_ref_pkg: reference arithmetic for the testbenches.
//
// GF(2^13) with reduction polynomial z^13+z^4+z^3+z+1, computed the plain
// way (carry-less product to 25 bits, then reduction from the top bit down),
// and polynomial product and long division over it on dynamic arrays
// (index = power of Z). Independent of the RTL's algorithms.
package mce_ref_pkg;

  typedef logic [12:0] gfe_t;
  typedef gfe_t poly_t[];

  function automatic gfe_t gmul(gfe_t a, gfe_t b);
    logic [24:0] p;
    p = '0;
    for (int i = 0; i < 13; i++)
      if (b[i]) p = p ^ (25'(a) << i);
    for (int k = 24; k >= 13; k--)
      if (p[k]) p = p ^ (25'h201B << (k - 13));
    return p[12:0];
  endfunction

  // inverse by exhaustive search (only used a few times per test)
  function automatic gfe_t ginv(gfe_t a);
    for (int x = 1; x < 8192; x++)
      if (gmul(a, gfe_t'(x)) == 13'd1) return gfe_t'(x);
    return '0;
  endfunction

  function automatic int pdeg(poly_t a);
    for (int i = a.size() - 1; i >= 0; i--)
      if (a[i] != '0) return i;
    return -1;
  endfunction

  function automatic poly_t pmul(poly_t a, poly_t b);
    poly_t c;
    c = new[a.size() + b.size()];
    foreach (c[i]) c[i] = '0;
    foreach (a[i])
      foreach (b[j])
        c[i+j] = c[i+j] ^ gmul(a[i], b[j]);
    return c;
  endfunction

  // long division: q = a / b, r = a mod b (b non-zero)
  function automatic void pdivmod(poly_t a, poly_t b, output poly_t q, output poly_t r);
    int   db, dr;
    gfe_t li, f;
    db = pdeg(b);
    li = ginv(b[db]);
    r  = new[a.size()];
    q  = new[a.size()];
    foreach (a[i]) begin r[i] = a[i]; q[i] = '0; end
    dr = pdeg(r);
    while (dr >= db) begin
      f = gmul(r[dr], li);
      q[dr-db] = f;
      for (int j = 0; j <= db; j++)
        r[dr-db+j] = r[dr-db+j] ^ gmul(f, b[j]);
      dr = pdeg(r);
    end
  endfunction

  // evaluate a(x) directly as a sum of powers
  function automatic gfe_t peval(poly_t a, gfe_t x);
    gfe_t s, p;
    s = '0;
    p = 13'd1;
    foreach (a[i]) begin
      s = s ^ gmul(a[i], p);
      p = gmul(p, x);
    end
    return s;
  endfunction

endpackage
