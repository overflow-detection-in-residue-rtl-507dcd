// Reference arithmetic for the RNS overflow testbenches, moduli set
// {2^n-1, 2^n, 2^n+1}. Everything here works on plain binary integers
// (64-bit, enough for n <= 20), independently of the design: forward
// conversion by the % operator, the group as an integer division, and the
// overflow condition X + Y >= M.
package rns_ref_pkg;

  typedef longint unsigned u64_t;

  function automatic u64_t m3(int n); return (u64_t'(1) << n) - 1; endfunction
  function automatic u64_t m2(int n); return  u64_t'(1) << n;      endfunction
  function automatic u64_t m1(int n); return (u64_t'(1) << n) + 1; endfunction

  // Dynamic range M = (2^n-1) 2^n (2^n+1) = 2^3n - 2^n.
  function automatic u64_t range_m(int n); return m3(n) * m2(n) * m1(n); endfunction

  // Indicator 2^2n - 2^n - 1: one less than the number of groups.
  function automatic u64_t indicator(int n);
    return (u64_t'(1) << (2 * n)) - (u64_t'(1) << n) - 1;
  endfunction

  // Group of a binary number: floor(X / (2^n+1)).
  function automatic u64_t group_of(u64_t x, int n); return x / m1(n); endfunction

  // Uniform-ish 64-bit random number below lim (lim > 0).
  function automatic u64_t rand_below(u64_t lim);
    u64_t r;
    r = {32'($urandom), 32'($urandom)};
    return r % lim;
  endfunction

endpackage
