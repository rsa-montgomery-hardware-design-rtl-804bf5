// mont_ref_pkg: reference model and stimulus helpers for the Montgomery
// multiplier testbenches.
//
// mont_ref#(K)::product(A, B, N) returns the exact value the K+2-iteration
// radix-2 loop must produce, computed in closed form rather than bit by bit:
//   Q = (-A*B * N^-1) mod 2^(K+2),   S = (A*B + Q*N) / 2^(K+2).
// Q is the unique multiple of N that makes A*B + Q*N divisible by 2^(K+2), so
// it equals the quotient bits the loop collects. N^-1 mod 2^(K+2) comes from
// Newton's iteration x <- x*(2 - N*x), which doubles the number of correct
// low bits per step, starting from x = N (correct to 3 bits for odd N).
package mont_ref_pkg;

  class mont_ref #(int unsigned K = 1024);

    localparam int unsigned W = 2 * K + 8;   // wide enough for every product
    typedef logic [W-1:0] wide_t;

    static function wide_t mask_r(input wide_t x);
      wide_t m;
      m = (wide_t'(1) << (K + 2)) - wide_t'(1);
      return x & m;
    endfunction

    static function wide_t product(input wide_t a, input wide_t b, input wide_t n);
      wide_t inv, t, q;
      inv = n;
      for (int i = 0; i < 16; i++)
        inv = mask_r(inv * mask_r(wide_t'(2) - mask_r(n * inv)));
      t = a * b;
      q = mask_r(mask_r(-t) * inv);
      return (t + q * n) >> (K + 2);
    endfunction

    // Uniform random value of the given number of bits.
    static function wide_t rand_bits(input int unsigned bits);
      wide_t x = '0;
      for (int i = 0; i < int'(bits); i += 32)
        x = (x << 32) | wide_t'($urandom);
      if (bits < W) x &= (wide_t'(1) << bits) - wide_t'(1);
      return x;
    endfunction

    // Random odd modulus with its top bit set: 2^(K-1) <= N < 2^K.
    static function wide_t rand_modulus();
      return rand_bits(K) | (wide_t'(1) << (K - 1)) | wide_t'(1);
    endfunction

    // Random operand below 2N.
    static function wide_t rand_operand(input wide_t n);
      wide_t x;
      x = rand_bits(K + 1);
      while (x >= 2 * n) x = x - 2 * n;
      return x;
    endfunction

  endclass

endpackage
