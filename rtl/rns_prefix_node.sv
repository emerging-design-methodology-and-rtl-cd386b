// rns_prefix_node: prefix combine operator of the binary-to-residue
// converter.
//
// Given the residues of two disjoint bit groups, m_hi = |X_hi|_M and
// m_lo = |X_lo|_M, and the OR of each group's bits, it forms the residue of
// the union as a 2-bit multiplexer
//   (any_hi, any_lo) -> [ 0, m_lo, m_hi, |m_hi + m_lo|_M ]
// where the last input comes from a modular adder (rns_addsub in add mode).
// A group whose bits are all zero has residue 0, so the multiplexer only
// saves the adder's correction when one side is empty; the operator is
// commutative and associative, which is what lets the converter arrange these
// nodes as a logarithmic prefix tree. any_out is the OR of both groups.
//
// Interface: m_hi, m_lo (RW bits), any_hi, any_lo in; m_out, any_out out.
// Combinational: one multiplexer plus one modular-adder delay.
module rns_prefix_node
  import rns_pkg::*;
#(
  parameter int unsigned M  = 7,
  localparam int unsigned RW = res_width(M)
) (
  input  logic [RW-1:0] m_hi,
  input  logic [RW-1:0] m_lo,
  input  logic          any_hi,
  input  logic          any_lo,
  output logic [RW-1:0] m_out,
  output logic          any_out
);
  localparam logic [RW-1:0] MOD = RW'(M);
  logic [RW-1:0] sum;

  rns_addsub #(.W(RW)) u_add (.a(m_hi), .b(m_lo), .m(MOD), .c0(1'b0), .sum(sum));

  always_comb begin
    unique case ({any_hi, any_lo})
      2'b00:   m_out = '0;
      2'b01:   m_out = m_lo;
      2'b10:   m_out = m_hi;
      default: m_out = sum;
    endcase
  end
  assign any_out = any_hi | any_lo;
endmodule
