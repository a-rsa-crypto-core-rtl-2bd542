// tb_bn_pkg: wide-integer and binary-polynomial reference arithmetic for the
// testbenches.  Modular products are formed bit by bit with additions,
// doublings and subtractions only (MSB-first interleaved multiplication), so
// no wide multiplier or divider is needed and the reference shares no
// algorithm with the Montgomery hardware under test.
package tb_bn_pkg;
  localparam int unsigned BN = 4224;
  typedef logic [BN-1:0] bn_t;

  function automatic bn_t bn_rnd(int unsigned bits);
    bn_t v = '0;
    for (int i = 0; i < (bits + 31) / 32; i++) v[i*32 +: 32] = $urandom;
    if (bits < BN) v &= (bn_t'(1) << bits) - 1;
    return v;
  endfunction

  function automatic int bn_top(bn_t a);
    int top = -1;
    for (int i = 0; i < BN; i++) if (a[i]) top = i;
    return top;
  endfunction

  // a mod n for any a (shift-and-subtract long division)
  function automatic bn_t bn_mod(bn_t a, bn_t n);
    bn_t r = '0;
    for (int i = bn_top(a); i >= 0; i--) begin
      r = (r << 1) | bn_t'(a[i]);
      if (r >= n) r -= n;
    end
    return r;
  endfunction

  // a * b mod n, with a, b < n
  function automatic bn_t bn_modmul(bn_t a, bn_t b, bn_t n);
    bn_t r = '0;
    for (int i = bn_top(a); i >= 0; i--) begin
      r = r << 1;
      if (r >= n) r -= n;
      if (a[i]) begin
        r += b;
        if (r >= n) r -= n;
      end
    end
    return r;
  endfunction

  // 2^k mod n
  function automatic bn_t bn_pow2mod(int unsigned k, bn_t n);
    bn_t r = bn_mod(1, n);
    for (int unsigned i = 0; i < k; i++) begin
      r = r << 1;
      if (r >= n) r -= n;
    end
    return r;
  endfunction

  // m^e mod n, right-to-left binary method
  function automatic bn_t bn_modexp(bn_t m, bn_t e, bn_t n);
    bn_t z = bn_mod(1, n), p = bn_mod(m, n);
    for (int i = 0; i <= bn_top(e); i++) begin
      if (e[i]) z = bn_modmul(z, p, n);
      p = bn_modmul(p, p, n);
    end
    return z;
  endfunction

  // carry-less product of polynomials of degree below db
  function automatic bn_t pl_mul(bn_t a, bn_t b, int unsigned db);
    bn_t r = '0;
    for (int i = 0; i < int'(db); i++) if (b[i]) r ^= a << i;
    return r;
  endfunction

  // remainder of a (degree below da) modulo m of degree dm
  function automatic bn_t pl_mod(bn_t a, bn_t m, int unsigned dm, int unsigned da);
    for (int i = int'(da) - 1; i >= int'(dm); i--) if (a[i]) a ^= m << (i - int'(dm));
    return a;
  endfunction

  // x^k mod n over GF(2)[x], n of degree dn
  function automatic bn_t pl_pow2mod(int unsigned k, bn_t n, int unsigned dn);
    bn_t r = 1;
    for (int unsigned i = 0; i < k; i++) begin
      r = r << 1;
      if (r[dn]) r ^= n;
    end
    return r;
  endfunction

  // m^e mod n over GF(2)[x], n of degree dn
  function automatic bn_t pl_modexp(bn_t m, bn_t e, bn_t n, int unsigned dn);
    bn_t z = 1, p = pl_mod(m, n, dn, BN);
    for (int i = 0; i <= bn_top(e); i++) begin
      if (e[i]) z = pl_mod(pl_mul(z, p, dn), n, dn, 2 * dn);
      p = pl_mod(pl_mul(p, p, dn), n, dn, 2 * dn);
    end
    return z;
  endfunction
endpackage
