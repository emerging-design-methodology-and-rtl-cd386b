// qca_xor_maj: two-input XOR made only of majority gates and inverters.
//
// x ^ y = M( M(~x, y, 0), M(x, ~y, 0), 1 ): the two inner gates act as AND
// gates producing ~x&y and x&~y, the outer gate ORs them. This is the XOR
// mapping used throughout the QCA networks (three majority gates, two
// inverters).
//
// Interface: x, y in, z out. Combinational.
module qca_xor_maj (
  input  logic x,
  input  logic y,
  output logic z
);
  logic t0, t1;
  qca_maj u_and0 (.a(~x), .b(y),  .c(1'b0), .y(t0));
  qca_maj u_and1 (.a(x),  .b(~y), .c(1'b0), .y(t1));
  qca_maj u_or   (.a(t0), .b(t1), .c(1'b1), .y(z));
endmodule
