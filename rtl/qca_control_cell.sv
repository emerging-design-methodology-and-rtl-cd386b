// qca_control_cell: control cell of the generalized pipeline array.
//
// One control cell sits at the most significant end of every array level. It
// produces the level's control line F that tells the arithmetic cells of that
// level whether to keep their sum (F=1) or to pass their A operand through
// unchanged (F=0):
//   F = C0 X + P ~X  =  M( M(C0, X, 0), M(P, ~X, 0), 1 )
// With X=1 (subtract modes: division, square root) F is the carry out of the
// level, i.e. 1 when the trial subtraction left a non-negative remainder. With
// X=0 (add modes: multiplication, squaring) F is the operand bit P of that
// level. X passes through to the next level unchanged.
//
// Interface: x, p, c0 (carry from the level's leftmost arithmetic cell) in;
// f and x_out out. Combinational; two majority levels plus an inverter.
module qca_control_cell (
  input  logic x,
  input  logic p,
  input  logic c0,
  output logic f,
  output logic x_out
);
  logic t_cx, t_px;
  qca_maj u_cx (.a(c0),  .b(x),    .c(1'b0), .y(t_cx));
  qca_maj u_px (.a(p),   .b(~x),   .c(1'b0), .y(t_px));
  qca_maj u_or (.a(t_cx),.b(t_px), .c(1'b1), .y(f));
  assign x_out = x;
endmodule
