// qca_maj: three-input majority gate, the basic logic element of quantum-dot
// cellular automata (QCA).
//
// y = M(a,b,c) = ab + ac + bc. With one input tied to 0 the gate is a 2-input
// AND, with one input tied to 1 it is a 2-input OR; together with an inverter
// it is logically complete. Every QCA network in this design (the f1/f2
// example functions and the pipeline-array cells) is built from instances of
// this gate so that the RTL keeps the majority-gate structure of the QCA
// layouts.
//
// Interface: a, b, c in, y out. Purely combinational, no timing of its own.
module qca_maj (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);
  assign y = (a & b) | (a & c) | (b & c);
endmodule
