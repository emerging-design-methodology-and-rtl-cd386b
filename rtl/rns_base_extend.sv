// rns_base_extend: base extension of a residue number to one extra modulus.
//
// Given the residues x_1..x_n of X over the base m_1..m_n (0 <= X < M =
// m_1..m_n), it produces |X|_MEXT for a further modulus MEXT relatively prime
// to the base. The mixed-radix digits a_ii come from the Diophantine matrix
// (rns_mrc); X is then re-evaluated modulo MEXT by Horner's rule on the
// mixed-radix form, from the most significant digit down:
//   acc = a_nn;  acc = |acc * m_i + a_ii|_MEXT  for i = n-1 .. 1.
// Only small modular multiplies by constants are needed; no modulo-M
// arithmetic.
//
// Interface: x[i] (residue modulo M[i]) in; x_ext (residue modulo MEXT) out.
// Combinational.
module rns_base_extend
  import rns_pkg::*;
#(
  parameter int unsigned NMOD     = 3,
  parameter int unsigned M [NMOD] = '{2, 3, 5},
  parameter int unsigned MEXT     = 7,
  parameter int unsigned RW       = 3,
  localparam int unsigned EW      = res_width(MEXT)
) (
  input  logic [NMOD-1:0][RW-1:0] x,
  output logic [EW-1:0]           x_ext
);
  logic [NMOD-1:0][RW-1:0] dig;

  rns_mrc #(.NMOD(NMOD), .M(M), .RW(RW)) u_mrc (.x(x), .dig(dig));

  always_comb begin
    int unsigned acc;
    acc = int'(dig[NMOD-1]) % MEXT;
    for (int i = NMOD - 2; i >= 0; i--)
      acc = (acc * (M[i] % MEXT) + int'(dig[i])) % MEXT;
    x_ext = EW'(acc);
  end
endmodule
