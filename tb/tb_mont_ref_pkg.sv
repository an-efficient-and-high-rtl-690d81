// tb_mont_ref_pkg: reference arithmetic for the Montgomery testbenches.
//
// Plain big-integer arithmetic on 128-bit vectors, independent of the
// bit-level algorithms in the design: products and remainders use the
// simulator's own * and % operators, and 2^-n mod m is obtained as
// ((m+1)/2)^n mod m (since 2 * (m+1)/2 = 1 mod m for odd m). Operands up
// to 62 bits are safe.
package tb_mont_ref_pkg;

  typedef logic [127:0] big_t;

  function automatic big_t mod_mul(big_t a, big_t b, big_t m);
    return (a * b) % m;
  endfunction

  function automatic big_t mod_pow(big_t a, big_t e, big_t m);
    big_t r = 1 % m;
    big_t x = a % m;
    while (e != 0) begin
      if (e[0]) r = mod_mul(r, x, m);
      x = mod_mul(x, x, m);
      e = e >> 1;
    end
    return r;
  endfunction

  // 2^-n mod m, m odd
  function automatic big_t inv2_pow(int n, big_t m);
    return mod_pow((m + 1) >> 1, big_t'(n), m);
  endfunction

  // a * b * 2^-n mod m, fully reduced
  function automatic big_t mont_ref(big_t a, big_t b, big_t m, int n);
    return mod_mul(mod_mul(a, b, m), inv2_pow(n, m), m);
  endfunction

  // 2^(2n) mod m
  function automatic big_t r2_ref(big_t m, int n);
    return mod_pow(big_t'(2), big_t'(2 * n), m);
  endfunction

  // random odd modulus of exactly `bits` bits (top bit set) when top is 1,
  // else any odd value >= 3 below 2^bits
  function automatic big_t rand_modulus(int bits, bit top);
    big_t v = {$urandom, $urandom, $urandom, $urandom};
    v = v & ((big_t'(1) << bits) - 1);
    if (top) v[bits-1] = 1'b1;
    v[0] = 1'b1;
    if (v < 3) v = 3;
    return v;
  endfunction

  function automatic big_t rand_below(big_t m);
    big_t v = {$urandom, $urandom, $urandom, $urandom};
    return v % m;
  endfunction

endpackage
