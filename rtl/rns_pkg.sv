// rns_pkg: elaboration-time helpers shared by the residue-number-system (RNS)
// blocks.
//
// All moduli in this design are parameters, so every residue constant the
// hardware needs (|2^j|_m for the binary-to-residue multiplexers, the
// multiplicative inverses |m_i^-1|_m_j of the mixed-radix matrix, |2^(m-2)|_m
// for scaling by two) is worked out here by constant functions while the
// design is elaborated; nothing here becomes logic by itself.
package rns_pkg;

  // bits needed to hold a residue 0..m-1 (at least 1)
  function automatic int unsigned res_width(input int unsigned m);
    return (m <= 2) ? 1 : $clog2(m);
  endfunction

  // |base^e|_m by repeated multiplication
  function automatic int unsigned pow_mod(input int unsigned base, input int unsigned e,
                                          input int unsigned m);
    int unsigned r;
    r = 1 % m;
    for (int unsigned i = 0; i < e; i++) r = (r * base) % m;
    return r;
  endfunction

  // multiplicative inverse |a^-1|_m by search (m small); 0 if none exists
  function automatic int unsigned mod_inv(input int unsigned a, input int unsigned m);
    for (int unsigned v = 1; v < m; v++)
      if (((a % m) * v) % m == 1) return v;
    return 0;
  endfunction

  // true if m is a prime number
  function automatic bit is_prime(input int unsigned m);
    if (m < 2) return 1'b0;
    for (int unsigned d = 2; d * d <= m; d++)
      if (m % d == 0) return 1'b0;
    return 1'b1;
  endfunction

endpackage
