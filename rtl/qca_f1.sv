// qca_f1: majority-gate realisation of the four-input example function
// f1(a,b,c,d) = sum of minterms (2,3,5,7,8,12,13,14), with a as the most
// significant variable.
//
// The function is first rewritten as an XOR of AND terms (the XOR-AND
// reduction): f1 = a ^ c ^ ad ^ bc ^ bd ^ acd, which folds to
// f1 = a ^ (~b & c) ^ (b & d) ^ (a & ~c & d). The four product terms are
// majority gates with one input tied to 0 (a & ~c & d uses two in series);
// the XOR tree has two leaves n1 = a ^ ~bc and n2 = bd ^ a~cd and a root
// f1 = n1 ^ n2, each XOR being three majority gates (qca_xor_maj). The product
// term "a" is written as M(a,1,0) as in the derivation.
//
// Interface: a, b, c, d in; f1 out; n1 and n2 (the two internal tree nodes)
// are brought out for observation. Combinational.
module qca_f1 (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic n1,
  output logic n2,
  output logic f1
);
  logic t_a, t_nbc, t_bd, t_ac_n, t_acd;

  qca_maj u_a    (.a(a),     .b(1'b1), .c(1'b0), .y(t_a));     // a
  qca_maj u_nbc  (.a(~b),    .b(c),    .c(1'b0), .y(t_nbc));   // ~b c
  qca_maj u_bd   (.a(b),     .b(d),    .c(1'b0), .y(t_bd));    // b d
  qca_maj u_anc  (.a(a),     .b(~c),   .c(1'b0), .y(t_ac_n));  // a ~c
  qca_maj u_ancd (.a(t_ac_n),.b(d),    .c(1'b0), .y(t_acd));   // a ~c d

  qca_xor_maj u_n1 (.x(t_a),  .y(t_nbc), .z(n1));
  qca_xor_maj u_n2 (.x(t_bd), .y(t_acd), .z(n2));
  qca_xor_maj u_f1 (.x(n1),   .y(n2),    .z(f1));
endmodule
