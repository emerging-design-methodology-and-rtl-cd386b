// rns_mrc: mixed-radix digits of a residue vector by the Diophantine
// (triangular matrix) method.
//
// For moduli m_1..m_n and residues x_1..x_n, the matrix A has first row
// a_1j = x_j, and every later row i (2 <= i <= j <= n) solves the linear
// Diophantine equation m_(i-1) q + a_(i-1)(i-1) = m_j q' + a_(i-1)j for its
// smallest non-negative solution:
//   a_ij = | c_ij * (a_(i-1)j - a_(i-1)(i-1)) |_(m_j),  c_ij = |m_(i-1)^-1|_(m_j)
// The diagonal a_11, a_22, .., a_nn are the mixed-radix digits:
//   X = a_11 + a_22 m_1 + a_33 m_1 m_2 + ... + a_nn m_1..m_(n-1).
// The constants c_ij are computed at elaboration (rns_pkg::mod_inv); each
// matrix entry is one constant multiply and one reduction modulo m_j, and all
// entries of a row are independent, so the hardware is n-1 layers deep.
// Entries are indexed from 0 in the code (row 0 = the residues).
//
// Interface: x[i] (residue modulo M[i], RW bits, must be < M[i]) in;
// dig[i] (the i-th mixed-radix digit, 0 <= dig[i] < M[i]) out.
// Combinational. The moduli must be pairwise relatively prime.
module rns_mrc
  import rns_pkg::*;
#(
  parameter int unsigned NMOD          = 3,
  parameter int unsigned M [NMOD]      = '{5, 7, 11},
  parameter int unsigned RW            = 4
) (
  input  logic [NMOD-1:0][RW-1:0] x,
  output logic [NMOD-1:0][RW-1:0] dig
);
  always_comb begin
    int unsigned a [NMOD][NMOD];
    int unsigned c, diff;
    for (int j = 0; j < NMOD; j++) a[0][j] = int'(x[j]);
    for (int i = 1; i < NMOD; i++)
      for (int j = 0; j < NMOD; j++) begin
        a[i][j] = 0;
        if (j >= i) begin
          c    = mod_inv(M[i-1], M[j]);
          // a_(i-1)(i-1) < m_(i-1) may exceed m_j: reduce it first
          diff = (a[i-1][j] + M[j] - (a[i-1][i-1] % M[j])) % M[j];
          a[i][j] = (c * diff) % M[j];
        end
      end
    for (int i = 0; i < NMOD; i++) dig[i] = RW'(a[i][i]);
  end
endmodule
