// tb_rsa_ref_pkg: reference arithmetic for the RSA testbenches, written with
// plain wide-integer operators so that it is independent of the Montgomery
// and carry-save hardware. Values up to 1024 bits; products and the constant
// 2^(2K+4) fit in big_t.
package tb_rsa_ref_pkg;
  typedef logic [2111:0] big_t;

  function automatic big_t mulmod(big_t a, big_t b, big_t n);
    return (a * b) % n;
  endfunction

  // M^E mod N by right-to-left binary exponentiation
  function automatic big_t modexp(big_t m, big_t e, big_t n);
    big_t r = big_t'(1) % n;
    big_t x = m % n;
    while (e != '0) begin
      if (e[0]) r = mulmod(r, x, n);
      x = mulmod(x, x, n);
      e = e >> 1;
    end
    return r;
  endfunction

  // Const = 2^(2K+4) mod N, the factor that moves a value into the domain
  // of a Montgomery multiplier with R = 2^(K+2)
  function automatic big_t mont_const(int k, big_t n);
    return (big_t'(1) << (2 * k + 4)) % n;
  endfunction

  // a random value of k bits (upper bits of the result clear)
  function automatic big_t rand_bits(int k);
    big_t v = '0;
    for (int i = 0; i < k; i += 32) v[i +: 32] = $urandom;
    for (int i = k; i < $bits(big_t); i++) v[i] = 1'b0;
    return v;
  endfunction

  // a random odd k-bit modulus with its top bit set
  function automatic big_t rand_modulus(int k);
    big_t n = rand_bits(k);
    n[0]     = 1'b1;
    n[k - 1] = 1'b1;
    return n;
  endfunction
endpackage
