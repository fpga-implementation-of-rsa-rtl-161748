// rsa_ref_pkg: reference arithmetic for the RSA coprocessor testbenches.
//
// Plain wide-integer arithmetic, independent of the word-serial hardware:
// modular product, Montgomery product via the modular inverse of R, modular
// exponentiation by square-and-multiply, R^2 mod m and m' = -m^-1 mod 2^32.
// N is the operand width in bits (32 * number of words).
package rsa_ref_pkg;

  class rsa_ref #(int N = 128);
    typedef logic [N-1:0]   num_t;
    typedef logic [2*N+1:0] wide_t;

    static function num_t mulmod(num_t a, num_t b, num_t m);
      wide_t p;
      p = wide_t'(a) * wide_t'(b);
      return num_t'(p % wide_t'(m));
    endfunction

    static function num_t powmod(num_t x, num_t e, num_t m, int nbits);
      num_t r;
      r = num_t'(wide_t'(1) % wide_t'(m));
      for (int i = nbits - 1; i >= 0; i--) begin
        r = mulmod(r, r, m);
        if (e[i]) r = mulmod(r, x, m);
      end
      return r;
    endfunction

    // R mod m and R^2 mod m, R = 2^N
    static function num_t r_mod(num_t m);
      wide_t r;
      r = '0;
      r[N] = 1'b1;
      return num_t'(r % wide_t'(m));
    endfunction

    static function num_t r2_mod(num_t m);
      wide_t r;
      r = '0;
      r[2*N] = 1'b1;
      return num_t'(r % wide_t'(m));
    endfunction

    // Montgomery product a*b*R^-1 mod m, computed at full width:
    // q = a*b*(-m^-1) mod R makes a*b + q*m divisible by R.
    static function num_t mont(num_t a, num_t b, num_t m);
      wide_t t, q, rmask;
      num_t  minv;
      minv = neg_inv_n(m);
      t = wide_t'(a) * wide_t'(b);
      rmask = (wide_t'(1) << N) - 1;
      q = ((t & rmask) * wide_t'(minv)) & rmask;
      t = (t + q * wide_t'(m)) >> N;
      if (t >= wide_t'(m)) t = t - wide_t'(m);
      return num_t'(t);
    endfunction

    // -m^-1 mod 2^N by Newton iteration (m odd)
    static function num_t neg_inv_n(num_t m);
      num_t inv;
      inv = 1;
      for (int k = 0; k < 12; k++) inv = inv * (num_t'(2) - m * inv);
      return -inv;
    endfunction

    static function logic [31:0] mprime(num_t m);
      logic [31:0] inv, m0;
      m0 = m[31:0];
      inv = 32'd1;
      for (int k = 0; k < 6; k++) inv = inv * (32'd2 - m0 * inv);
      return -inv;
    endfunction

    static function num_t rand_num();
      num_t v;
      for (int k = 0; k < N / 32; k++) v[32*k +: 32] = $urandom;
      return v;
    endfunction

    // random odd modulus with the top bit set; 'near_r' forces the top word
    // to all ones so that intermediate results can reach R
    static function num_t rand_mod(bit near_r);
      num_t m;
      m = rand_num();
      m[0] = 1'b1;
      m[N-1] = 1'b1;
      if (near_r) m[N-1 -: 32] = 32'hFFFF_FFFF;
      return m;
    endfunction

    static function num_t rand_below(num_t m);
      wide_t v;
      v = wide_t'(rand_num());
      return num_t'(v % wide_t'(m));
    endfunction
  endclass

endpackage
