// tb_util_pkg: reference arithmetic for the testbenches.
//
// Plain wide-integer arithmetic (4096-bit), independent of the carry-save RTL:
// random numbers, reduction modulo p, conversion into the Montgomery domain
// (x -> x * 2^(m+3) mod p) and the 4-isogeny map in affine-free projective
// form, X' = X (X w0 - Z)(X w1 - Z)^2, Z' = Z (X - w0 Z)(X - w1 Z)^2.
package tb_util_pkg;
  typedef logic [4095:0] big_t;

  function automatic big_t rand_bits(input int unsigned n);
    big_t v = '0;
    for (int k = 0; k < 128; k++) v[k*32 +: 32] = $urandom();
    if (n < 4096) v &= (big_t'(1) << n) - big_t'(1);
    return v;
  endfunction

  function automatic big_t mulmod(input big_t a, input big_t b, input big_t p);
    return ((a % p) * (b % p)) % p;
  endfunction

  function automatic big_t submod(input big_t a, input big_t b, input big_t p);
    return ((a % p) + p - (b % p)) % p;
  endfunction

  function automatic big_t to_mont(input big_t x, input big_t p, input int unsigned m);
    return ((x % p) << (m + 3)) % p;
  endfunction

  // a random carry-save pair (c, s) of m-bit shares with c + s = v (mod p)
  function automatic void split_cs(input big_t v, input big_t p, input int unsigned m,
                                   output big_t c, output big_t s);
    c = rand_bits(m);
    s = submod(v, c, p);
  endfunction

  function automatic void iso4_ref(input big_t x, input big_t z, input big_t w0, input big_t w1,
                                   input big_t p, output big_t xo, output big_t zo);
    big_t e0, e1, d0, d1;
    e0 = submod(mulmod(x, w0, p), z, p);
    e1 = submod(mulmod(x, w1, p), z, p);
    d0 = submod(x, mulmod(w0, z, p), p);
    d1 = submod(x, mulmod(w1, z, p), p);
    xo = mulmod(mulmod(x, e0, p), mulmod(e1, e1, p), p);
    zo = mulmod(mulmod(z, d0, p), mulmod(d1, d1, p), p);
  endfunction
endpackage
