// qca_arith_cell: arithmetic cell of the generalized pipeline array, a
// controlled 1-bit adder/subtractor written as a QCA majority-gate network.
//
// Boolean function:
//   S  = [A ^ (B ^ X) ^ C1] F + A ~F      sum, or A passed through when F=0
//   C0 = (B ^ X)(A + C1) + A C1           carry out (independent of F)
//   D  = C (B + F)                        subtrahend/operand forwarding
//   E  = (B + C)(B + F)
// X=0 makes the cell an adder, X=1 a subtractor (B is inverted; the level's
// least significant carry-in is X). F, from the level's control cell, chooses
// between the new sum and the old A, which gives restoring division and
// square root, and conditional addition for multiplication and squaring.
// D and E carry the (B, C) pair to the next level: with B=C both equal B (a
// plain shifted operand); the pair (0,1) becomes (F,F), inserting the level's
// result bit; the pair (1,0) becomes (0,1). This is what builds the
// square-root subtrahend 0..0 F1..Fk 0 1 level by level.
//
// Majority-gate mapping (per the cell's QCA equations):
//   n1 = B ^ X, n2 = A ^ C1, n3 = n1 ^ n2  (each XOR is three majority gates)
//   S  = M( M(n3, F, 0), M(A, ~F, 0), 1 )
//   C0 = M( M( M(A, C1, 1), n1, 0 ), M(A, C1, 0), 1 )
//   D  = M( C, M(B, F, 1), 0 )
//   E  = M( M(B, C, 1), M(B, F, 1), 0 )
//
// Interface: a, b, c, x, f, c1 in; s, c0, d, e out; x and f also pass
// through. Combinational.
module qca_arith_cell (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic x,
  input  logic f,
  input  logic c1,
  output logic s,
  output logic c0,
  output logic d,
  output logic e
);
  logic n1, n2, n3;
  logic t_sf, t_af, t_aoc, t_aac, t_g, t_bof, t_boc;

  qca_xor_maj u_n1 (.x(b),  .y(x),  .z(n1));
  qca_xor_maj u_n2 (.x(a),  .y(c1), .z(n2));
  qca_xor_maj u_n3 (.x(n1), .y(n2), .z(n3));

  // sum with restore select
  qca_maj u_sf  (.a(n3),   .b(f),    .c(1'b0), .y(t_sf));
  qca_maj u_af  (.a(a),    .b(~f),   .c(1'b0), .y(t_af));
  qca_maj u_s   (.a(t_sf), .b(t_af), .c(1'b1), .y(s));

  // carry out
  qca_maj u_aoc (.a(a),     .b(c1),    .c(1'b1), .y(t_aoc));
  qca_maj u_g   (.a(t_aoc), .b(n1),    .c(1'b0), .y(t_g));
  qca_maj u_aac (.a(a),     .b(c1),    .c(1'b0), .y(t_aac));
  qca_maj u_c0  (.a(t_g),   .b(t_aac), .c(1'b1), .y(c0));

  // operand forwarding
  qca_maj u_bof (.a(b),     .b(f),     .c(1'b1), .y(t_bof));
  qca_maj u_d   (.a(c),     .b(t_bof), .c(1'b0), .y(d));
  qca_maj u_boc (.a(b),     .b(c),     .c(1'b1), .y(t_boc));
  qca_maj u_e   (.a(t_boc), .b(t_bof), .c(1'b0), .y(e));
endmodule
