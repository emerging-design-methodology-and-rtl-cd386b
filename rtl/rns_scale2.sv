// rns_scale2: scaling of a residue number by two.
//
// The base is n-1 odd prime moduli followed by the modulus 2 (default
// (3, 5, 2), dynamic range M = 30). The result is X/2 for even X and the
// rounded value (X+1)/2 for odd X; the parity of X is simply its residue
// modulo 2.
//   1. Make the dividend even: x'_i = x_i (X even) or |x_i + 1|_m_i (X odd).
//   2. Division with zero remainder on every odd modulus:
//        y_i = | x'_i * |2^(m_i - 2)|_m_i |_m_i
//      (for a prime m_i, 2^(m_i-2) is the inverse of 2 by Fermat's theorem).
//   3. The modulo-2 residue of the quotient cannot be found that way. Take
//      the vector (y_1, .., y_(n-1), 0) and compute its mixed-radix digits
//      (rns_mrc). That vector is the even number congruent to the quotient
//      modulo the odd moduli; its last digit D is 1 exactly when the quotient
//      is odd, so the result's modulo-2 residue is R = D.
// This design uses step 3 for odd X too (X+1 is even), so the modulo-2 digit
// is right for every X. X = M-1 is the one input whose rounded half, M/2, is
// outside the range and wraps to 0.
//
// Interface: x[i] (residues, x[NMOD-1] modulo 2) in; q[i] (residues of the
// scaled value) out. Combinational.
module rns_scale2
  import rns_pkg::*;
#(
  parameter int unsigned NMOD     = 3,
  parameter int unsigned M [NMOD] = '{3, 5, 2},
  parameter int unsigned RW       = 3
) (
  input  logic [NMOD-1:0][RW-1:0] x,
  output logic [NMOD-1:0][RW-1:0] q
);
  // the last modulus must be 2 and the others odd primes
  if (M[NMOD-1] != 2) begin : g_bad_last
    $error("rns_scale2: the last modulus must be 2");
  end
  for (genvar i = 0; i < NMOD - 1; i++) begin : g_chk
    if (!is_prime(M[i]) || M[i] == 2) begin : g_bad
      $error("rns_scale2: moduli before the last must be odd primes");
    end
  end

  logic                    odd;
  logic [NMOD-1:0][RW-1:0] y0, dig;

  assign odd = x[NMOD-1][0];

  always_comb begin
    int unsigned xe;
    y0 = '0;
    for (int i = 0; i < NMOD - 1; i++) begin
      xe    = (int'(x[i]) + (odd ? 1 : 0)) % M[i];
      y0[i] = RW'((xe * pow_mod(2, M[i] - 2, M[i])) % M[i]);
    end
    y0[NMOD-1] = '0;
  end

  rns_mrc #(.NMOD(NMOD), .M(M), .RW(RW)) u_mrc (.x(y0), .dig(dig));

  always_comb begin
    q            = y0;
    q[NMOD-1]    = RW'(dig[NMOD-1][0]);
  end
endmodule
