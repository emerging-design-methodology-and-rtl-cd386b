// qca_f2: majority-gate realisation of the three-input example function
// f2(a,b,c) = sum of minterms (0,2,3,4,7), with a as the most significant
// variable.
//
// XOR-AND form: f2 = 1 ^ c ^ ab ^ bc ^ abc, which folds to
// f2 = ~c ^ (a & b) ^ (~a & b & c). The tree has one inner node
// n = ~c ^ ab and the root f2 = n ^ ~abc. AND terms are majority gates with a
// 0 input; each XOR is three majority gates (qca_xor_maj).
//
// Interface: a, b, c in; f2 out; n (inner tree node) out. Combinational.
module qca_f2 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic n,
  output logic f2
);
  logic t_ab, t_nab, t_nabc;

  qca_maj u_ab   (.a(a),     .b(b), .c(1'b0), .y(t_ab));    // a b
  qca_maj u_nab  (.a(~a),    .b(b), .c(1'b0), .y(t_nab));   // ~a b
  qca_maj u_nabc (.a(t_nab), .b(c), .c(1'b0), .y(t_nabc));  // ~a b c

  qca_xor_maj u_n  (.x(~c), .y(t_ab),   .z(n));
  qca_xor_maj u_f2 (.x(n),  .y(t_nabc), .z(f2));
endmodule
