// icg_ref_pkg: reference arithmetic for the testbenches.
//
// The inverse is computed by Fermat's little theorem, x^(m-2) mod m, with
// square-and-multiply on 128-bit products, a method independent of the
// Euclidean algorithm in the hardware. Operands up to 64 bits are supported.
package icg_ref_pkg;

  typedef logic [63:0] u64_t;

  function automatic u64_t ref_mulmod(input u64_t a, input u64_t b, input u64_t m);
    logic [127:0] p;
    p = {64'd0, a} * {64'd0, b};
    return 64'(p % {64'd0, m});
  endfunction

  function automatic u64_t ref_addmod(input u64_t a, input u64_t b, input u64_t m);
    logic [64:0] s;
    s = {1'b0, a % m} + {1'b0, b % m};
    return 64'(s % {1'b0, m});
  endfunction

  function automatic u64_t ref_powmod(input u64_t x, input u64_t e, input u64_t m);
    u64_t r, b;
    r = 64'd1 % m;
    b = x % m;
    for (int i = 0; i < 64; i++) begin
      if (e[i]) r = ref_mulmod(r, b, m);
      b = ref_mulmod(b, b, m);
    end
    return r;
  endfunction

  // Inverse modulo a prime m, with 0 mapped to 0.
  function automatic u64_t ref_inv(input u64_t x, input u64_t m);
    if (x % m == 0) return 64'd0;
    return ref_powmod(x, m - 64'd2, m);
  endfunction

  // A random 64-bit value below m (m > 0).
  function automatic u64_t ref_rand_below(input u64_t m);
    u64_t r;
    r = {$urandom(), $urandom()};
    return r % m;
  endfunction

endpackage
