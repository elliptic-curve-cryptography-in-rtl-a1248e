// tb_ecc_ref_pkg - behavioural reference model of GF(2^m) and Koblitz-curve
// arithmetic for the testbenches.
//
// Deliberately written differently from the RTL: multiplication is bit-serial
// MSB-first with the full reduction polynomial, inversion is Fermat's
// a^(2^m - 2) by repeated squaring, reduction of a long vector sums
// precomputed x^i mod F terms. Field elements are 571-bit vectors with the
// field size m passed at run time. Points use (0,0) for the point at
// infinity; scalars are tau-adic digit strings, as in the core.
package tb_ecc_ref_pkg;

  typedef logic [570:0]  fe_t;
  typedef logic [1141:0] fe2_t;
  typedef struct packed { fe_t x; fe_t y; } pt_t;

  function automatic fe_t fpoly_full_low(int m);   // F(x) - x^m
    fe_t f = '0;
    case (m)
      163: f = (fe_t'(1) << 7) | (fe_t'(1) << 6) | (fe_t'(1) << 3) | fe_t'(1);
      233: f = (fe_t'(1) << 74) | fe_t'(1);
      283: f = (fe_t'(1) << 12) | (fe_t'(1) << 7) | (fe_t'(1) << 5) | fe_t'(1);
      409: f = (fe_t'(1) << 87) | fe_t'(1);
      571: f = (fe_t'(1) << 10) | (fe_t'(1) << 5) | (fe_t'(1) << 2) | fe_t'(1);
      default: f = '0;
    endcase
    return f;
  endfunction

  function automatic fe_t mask(int m);
    return (m >= 571) ? '1 : ((fe_t'(1) << m) - 1);
  endfunction

  // a * x mod F
  function automatic fe_t mulx(fe_t a, int m);
    logic top = a[m-1];
    fe_t r = (a << 1) & mask(m);
    if (top) r ^= fpoly_full_low(m);
    return r;
  endfunction

  function automatic fe_t fmul(fe_t a, fe_t b, int m);
    fe_t r = '0;
    for (int i = m - 1; i >= 0; i--) begin
      r = mulx(r, m);
      if (b[i]) r ^= a;
    end
    return r;
  endfunction

  function automatic fe_t fsq(fe_t a, int m);
    return fmul(a, a, m);
  endfunction

  function automatic fe_t finv(fe_t a, int m);
    fe_t t = a, r = fe_t'(1);
    for (int i = 1; i < m; i++) begin
      t = fsq(t, m);
      r = fmul(r, t, m);
    end
    return r;
  endfunction

  // reduce a polynomial of up to 2m-1 bits: sum of x^i mod F over set bits
  function automatic fe_t freduce(fe2_t c, int w, int m);
    fe_t r = '0, p = fe_t'(1);
    for (int i = 0; i < w; i++) begin
      if (c[i]) r ^= p;
      p = mulx(p, m);
    end
    return r;
  endfunction

  function automatic logic acoef(int m);
    return m == 163;
  endfunction

  function automatic pt_t padd(pt_t p, pt_t q, int m);
    pt_t r;
    fe_t l;
    fe_t a = fe_t'(acoef(m));
    if (p.x == '0 && p.y == '0) return q;
    if (q.x == '0 && q.y == '0) return p;
    if (p.x == q.x && p.y != q.y) return '0;
    if (p.x == q.x) begin
      if (p.x == '0) return '0;
      l   = p.x ^ fmul(p.y, finv(p.x, m), m);
      r.x = fsq(l, m) ^ l ^ a;
      r.y = fsq(p.x, m) ^ fmul(l, r.x, m) ^ r.x;
    end else begin
      l   = fmul(p.y ^ q.y, finv(p.x ^ q.x, m), m);
      r.x = fsq(l, m) ^ l ^ p.x ^ q.x ^ a;
      r.y = fmul(l, p.x ^ r.x, m) ^ r.x ^ p.y;
    end
    return r;
  endfunction

  function automatic pt_t pneg(pt_t p);
    pt_t r;
    r.x = p.x;
    r.y = p.x ^ p.y;
    return r;
  endfunction

  function automatic pt_t tmul(fe_t k, pt_t p, int m);
    pt_t q = '0;
    for (int i = m - 1; i >= 0; i--) begin
      q.x = fsq(q.x, m);
      q.y = fsq(q.y, m);
      if (k[i]) q = padd(q, p, m);
    end
    return q;
  endfunction

  function automatic bit on_curve(pt_t p, int m);
    fe_t x2 = fsq(p.x, m);
    fe_t lhs = fsq(p.y, m) ^ fmul(p.x, p.y, m);
    fe_t rhs = fmul(x2, p.x, m) ^ (acoef(m) ? x2 : '0) ^ fe_t'(1);
    return lhs == rhs;
  endfunction

  function automatic pt_t gen163();
    pt_t g;
    g.x = fe_t'(164'h2FE13C0537BBC11ACAA07D793DE4E6D5E5C94EEE8);
    g.y = fe_t'(164'h289070FB05D38FF58321F2E800536D538CCDAA3D9);
    return g;
  endfunction

  function automatic pt_t gen233();
    pt_t g;
    g.x = fe_t'(236'h017232BA853A7E731AF129F22FF4149563A419C26BF50A4C9D6EEFAD6126);
    g.y = fe_t'(236'h01DB537DECE819B7F70F555A67C427A8CD9BF18AEB9B56E0C11056FAE6A3);
    return g;
  endfunction

  function automatic fe_t rand_fe(int m);
    fe_t r;
    for (int i = 0; i < 17; i++) r[i*32 +: 32] = $urandom();
    r[570:544] = 27'($urandom());
    return r & mask(m);
  endfunction

endpackage
