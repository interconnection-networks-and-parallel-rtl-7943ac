// pms_pkg: constants and elaboration-time number theory shared by the
// prime-bank memory system.
//
// The memory system uses a prime number M of banks. The Linear Permutation
// Network relies on the non-zero residues 1..M-1 forming a cyclic group under
// multiplication modulo M, so every module that wires that network needs
// g^k mod M and its inverse, the discrete logarithm log_mod(x). These are
// computed here as constant functions, so tables are formed by elaboration
// rather than pasted in. Nothing in this package is clocked.
package pms_pkg;

  // g^k mod m, by repeated multiplication (all values small).
  function automatic int unsigned pow_mod(int unsigned g, int unsigned k, int unsigned m);
    int unsigned r;
    r = 1 % m;
    for (int unsigned i = 0; i < k; i++) r = (r * g) % m;
    return r;
  endfunction

  // Discrete logarithm: the k in 0..m-2 with g^k mod m = x (0 if none).
  function automatic int unsigned log_mod(int unsigned g, int unsigned x, int unsigned m);
    int unsigned r;
    int unsigned res;
    r   = 1 % m;
    res = 0;
    for (int unsigned k = 0; k + 1 < m; k++) begin
      if (r == x) begin
        res = k;
        break;
      end
      r = (r * g) % m;
    end
    return res;
  endfunction

  // True when g generates the multiplicative group modulo prime m,
  // i.e. the order of g is m-1.
  function automatic bit is_generator(int unsigned g, int unsigned m);
    int unsigned r;
    bit ok;
    if (m < 3) return (m == 2) && (g % 2 == 1);
    r  = g % m;
    ok = (r != 0);
    for (int unsigned k = 1; k + 1 < m; k++) begin
      if (r == 1) ok = 1'b0;
      r = (r * g) % m;
    end
    return ok && (r == 1);
  endfunction

  // True when m is prime.
  function automatic bit is_prime(int unsigned m);
    if (m < 2) return 1'b0;
    for (int unsigned d = 2; d * d <= m; d++)
      if (m % d == 0) return 1'b0;
    return 1'b1;
  endfunction

  // Width of an index 0..n-1 (at least 1).
  function automatic int unsigned idx_w(int unsigned n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

endpackage
