// gf_ref_pkg: reference arithmetic for the Galois encoder testbenches.
//
// Computes the field product by a different route from the RTL: first the
// full carry-less product of A and B (up to 2N-1 bits), then polynomial
// long division by P starting at the highest term. Valid for any P whose
// x^N coefficient is 1. Also reports how many times the division had to
// subtract P, which the testbenches use to show that reduction happened.
package gf_ref_pkg;

  function automatic int unsigned clmul(int unsigned a, int unsigned b, int unsigned n);
    int unsigned acc = 0;
    for (int unsigned i = 0; i < n; i++)
      if (a[i]) acc ^= (b << i);
    return acc;
  endfunction

  function automatic int unsigned gf_mod(int unsigned v, int unsigned p, int unsigned n,
                                         output int unsigned subtractions);
    subtractions = 0;
    for (int d = 2 * n - 2; d >= int'(n); d--) begin
      if (v[d]) begin
        v ^= (p << (d - n));
        subtractions++;
      end
    end
    return v & ((1 << n) - 1);
  endfunction

  function automatic int unsigned gf_mul(int unsigned a, int unsigned b, int unsigned p,
                                         int unsigned n);
    int unsigned subs;
    return gf_mod(clmul(a, b, n), p, n, subs);
  endfunction

endpackage
