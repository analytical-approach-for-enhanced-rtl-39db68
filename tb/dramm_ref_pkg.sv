// dramm_ref_pkg: bit-exact software reference for the DRAMM testbenches.
//
// Integers and GF(2) polynomials are held in 256-bit vectors (bit k of a
// polynomial is the coefficient of x^k). f = 0 selects integer arithmetic,
// f = 1 polynomial arithmetic. Inverses use Fermat's little theorem, so every
// modulus handed to finv must be a prime (integers) or an irreducible
// polynomial. make_const() produces the contents of one lane's constant bank
// exactly as dramm_pkg lays it out, from the moduli of the two bases and the
// field modulus p. Nothing here is shared with the RTL's arithmetic.
package dramm_ref_pkg;

  typedef logic [255:0] big_t;

  function automatic int pdeg(big_t a);
    for (int k = 255; k >= 0; k--) if (a[k]) return k;
    return -1;
  endfunction

  function automatic big_t clmul(big_t a, big_t b);
    big_t r = '0;
    for (int k = 0; k < 128; k++) if (b[k]) r ^= a << k;
    return r;
  endfunction

  function automatic big_t pmod(big_t a, big_t m);
    int dm = pdeg(m);
    for (int k = 255; k >= dm; k--) if (a[k]) a ^= m << (k - dm);
    return a;
  endfunction

  function automatic big_t pdiv(big_t a, big_t m);
    big_t q = '0;
    int dm = pdeg(m);
    for (int k = 255; k >= dm; k--)
      if (a[k]) begin
        a ^= m << (k - dm);
        q[k-dm] = 1'b1;
      end
    return q;
  endfunction

  function automatic big_t fmul(bit f, big_t a, big_t b);
    return f ? clmul(a, b) : a * b;
  endfunction

  function automatic big_t fmod(bit f, big_t a, big_t m);
    return f ? pmod(a, m) : a % m;
  endfunction

  function automatic big_t fdiv(bit f, big_t a, big_t m);
    return f ? pdiv(a, m) : a / m;
  endfunction

  function automatic big_t fmulmod(bit f, big_t a, big_t b, big_t m);
    return fmod(f, fmul(f, fmod(f, a, m), fmod(f, b, m)), m);
  endfunction

  function automatic big_t faddmod(bit f, big_t a, big_t b, big_t m);
    return f ? pmod(a ^ b, m) : (a + b) % m;
  endfunction

  function automatic big_t fneg(bit f, big_t a, big_t m);
    big_t r = fmod(f, a, m);
    return (f || r == 0) ? r : m - r;
  endfunction

  function automatic big_t fpow(bit f, big_t a, big_t e, big_t m);
    big_t r = 1;
    for (int k = pdeg(e); k >= 0; k--) begin
      r = fmulmod(f, r, r, m);
      if (e[k]) r = fmulmod(f, r, a, m);
    end
    return r;
  endfunction

  // inverse modulo a prime / an irreducible polynomial
  function automatic big_t finv(bit f, big_t a, big_t m);
    big_t e = f ? ((big_t'(1) << pdeg(m)) - 2) : (m - 2);
    return fpow(f, a, e, m);
  endfunction

  typedef big_t mods_t [4];

  // W_i = product of the first i moduli of a base (W_0 = 1)
  function automatic big_t wprod(bit f, mods_t ms, int i);
    big_t w = 1;
    for (int k = 0; k < i; k++) w = fmul(f, w, ms[k]);
    return w;
  endfunction

  // constant idx of lane j; own = moduli of the bank's base, oth = other base
  function automatic big_t make_const(bit f, int l, int r, mods_t own, mods_t oth,
                                      big_t p, int j, int idx);
    big_t m = own[j];
    big_t wj = wprod(f, own, j);
    if (idx < l)                    // POW
      return fmod(f, big_t'(1) << (r * idx), m);
    if (idx < 2*l) begin            // MRCK
      int i = idx - l;
      if (i >= j) return '0;
      return fneg(f, fmulmod(f, wprod(f, own, i), finv(f, fmod(f, wj, m), m), m), m);
    end
    if (idx < 3*l)                  // BEXT
      return fmod(f, wprod(f, oth, idx - 2*l), m);
    if (idx < 4*l)                  // WDIG
      return (wj >> (r * (idx - 3*l))) & ((big_t'(1) << r) - 1);
    if (idx == 4*l)                 // MRCINV
      return finv(f, fmod(f, wj, m), m);
    if (idx == 4*l + 1)             // NEGPINV
      return fneg(f, finv(f, fmod(f, p, m), m), m);
    if (idx == 4*l + 2)             // PMOD
      return fmod(f, p, m);
    if (idx == 4*l + 3)             // QINV (product of the other base)
      return finv(f, fmod(f, wprod(f, oth, l), m), m);
    return m;                       // MOD
  endfunction

endpackage
