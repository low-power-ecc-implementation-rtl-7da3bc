// ecc_ref_pkg: reference arithmetic for the testbenches, written independently
// of the RTL. Field elements are MAX_M-bit vectors whose low m bits are used;
// the field (m, reduction polynomial without x^m) is passed at run time.
// Scalar multiplication uses affine double-and-add with Fermat inversion, a
// different algorithm from the core's ladder, so agreement is meaningful.
// The point at infinity is (0, 0).
package ecc_ref_pkg;
  localparam int unsigned W = 571;
  typedef logic [W-1:0] fe_t;

  function automatic fe_t mask(int unsigned m);
    fe_t r = '0;
    for (int i = 0; i < m; i++) r[i] = 1'b1;
    return r;
  endfunction

  // bit-by-bit product, least significant bit of b first
  function automatic fe_t gmul(fe_t a, fe_t b, int unsigned m, fe_t rp);
    fe_t r = '0, t = a, mk = mask(m);
    logic hi;
    for (int i = 0; i < m; i++) begin
      if (b[i]) r ^= t;
      hi = t[m-1];
      t = (t << 1) & mk;
      if (hi) t ^= rp;
    end
    return r;
  endfunction

  function automatic fe_t ginv(fe_t a, int unsigned m, fe_t rp);
    fe_t r = 1, s = a;
    for (int i = 1; i < m; i++) begin   // a^(2+4+...+2^(m-1)) = a^(2^m-2)
      s = gmul(s, s, m, rp);
      r = gmul(r, s, m, rp);
    end
    return r;
  endfunction

  typedef struct { fe_t x; fe_t y; logic inf; } pt_t;

  function automatic pt_t padd(pt_t p, pt_t q, fe_t ca, int unsigned m, fe_t rp);
    pt_t r; fe_t l;
    r.inf = 1'b0;
    if (p.inf) return q;
    if (q.inf) return p;
    if (p.x == q.x) begin
      if ((p.y ^ q.y) == p.x || p.x == '0) begin r.inf = 1'b1; r.x = '0; r.y = '0; return r; end
      l   = p.x ^ gmul(p.y, ginv(p.x, m, rp), m, rp);
      r.x = gmul(l, l, m, rp) ^ l ^ ca;
      r.y = gmul(p.x, p.x, m, rp) ^ gmul(l ^ fe_t'(1), r.x, m, rp);
    end else begin
      l   = gmul(p.y ^ q.y, ginv(p.x ^ q.x, m, rp), m, rp);
      r.x = gmul(l, l, m, rp) ^ l ^ p.x ^ q.x ^ ca;
      r.y = gmul(l, p.x ^ r.x, m, rp) ^ r.x ^ p.y;
    end
    return r;
  endfunction

  function automatic pt_t smul(fe_t k, pt_t p, fe_t ca, int unsigned m, fe_t rp);
    pt_t r;
    r.inf = 1'b1; r.x = '0; r.y = '0;
    for (int i = int'(m) - 1; i >= 0; i--) begin
      r = padd(r, r, ca, m, rp);
      if (k[i]) r = padd(r, p, ca, m, rp);
    end
    if (r.inf) begin r.x = '0; r.y = '0; end
    return r;
  endfunction

  function automatic logic on_curve(fe_t x, fe_t y, fe_t ca, int unsigned m, fe_t rp);
    fe_t x2 = gmul(x, x, m, rp);
    return (gmul(y, y, m, rp) ^ gmul(x, y, m, rp)) ==
           (gmul(x2, x, m, rp) ^ gmul(ca, x2, m, rp) ^ fe_t'(1));
  endfunction

  // a point of y^2 + xy = x^3 + a x^2 + 1 (odd m) found from a seed x by the
  // half-trace: z^2 + z = x + a + 1/x^2, y = x z
  function automatic pt_t find_point(fe_t seed, fe_t ca, int unsigned m, fe_t rp);
    pt_t p; fe_t x, beta, z, h, ix;
    x = seed & mask(m);
    if (x == '0) x = 2;
    forever begin
      ix   = ginv(x, m, rp);
      beta = x ^ ca ^ gmul(ix, ix, m, rp);
      h = beta; z = beta;
      for (int i = 1; i <= (int'(m) - 1) / 2; i++) begin
        h = gmul(h, h, m, rp); h = gmul(h, h, m, rp);
        z ^= h;
      end
      if ((gmul(z, z, m, rp) ^ z) == beta) begin
        p.x = x; p.y = gmul(x, z, m, rp); p.inf = 1'b0;
        return p;
      end
      x = (x + 1) & mask(m);
      if (x == '0) x = 2;
    end
  endfunction

  function automatic fe_t rand_fe(int unsigned m);
    fe_t r;
    for (int i = 0; i < W; i += 32) r[i +: 32] = $urandom;
    return r & mask(m);
  endfunction
endpackage
