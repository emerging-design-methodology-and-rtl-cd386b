// bin2rns: parallel-prefix binary-to-residue converter, |b|_M for an NB-bit
// unsigned binary number b, without lookup tables or processing elements.
//
// The input is cut, from the least significant end, into groups of LEAF bits
// (the most significant group holds whatever is left). Each group feeds a
// pre-processing multiplexer (rns_leaf_mux) whose constant inputs are the
// residues of every bit pattern of that group. The group residues are then
// merged pairwise by prefix combine nodes (rns_prefix_node: a 2-bit
// multiplexer selected by the OR of each side's bits, plus one modular adder)
// in a balanced binary tree, so a converter with G groups has G-1 combine
// nodes and ceil(log2 G) combine layers.
//   NB = 8,  LEAF = 2: groups (b7,b6)(b5,b4)(b3,b2)(b1,b0), two combine
//                      layers: delay 3 mux + 2 modular adders.
//   NB = 10, LEAF = 3: groups (b9)(b8..b6)(b5..b3)(b2..b0): three 8-input
//                      muxes, three combine nodes (three 4-input muxes,
//                      three modular adders), delay 3 mux + 2 adders.
// The tree is padded to a power of two of groups; padding groups are constant
// zero and their combine nodes reduce to wires.
//
// Interface: b (NB bits) in; r (residue, RW bits) out. Combinational.
module bin2rns
  import rns_pkg::*;
#(
  parameter int unsigned NB   = 8,
  parameter int unsigned M    = 7,
  parameter int unsigned LEAF = 2,
  localparam int unsigned RW  = res_width(M)
) (
  input  logic [NB-1:0] b,
  output logic [RW-1:0] r
);
  localparam int unsigned G   = (NB + LEAF - 1) / LEAF;     // groups
  localparam int unsigned GP  = (G <= 1) ? 1 : (1 << $clog2(G)); // padded

  // heap-ordered tree: node 1 is the root, node i has children 2i (more
  // significant) and 2i+1; leaves are nodes GP .. 2GP-1, most significant
  // first.
  logic [RW-1:0] node_m   [1:2*GP-1];
  logic          node_any [1:2*GP-1];

  for (genvar g = 0; g < GP; g++) begin : g_leaf
    localparam int unsigned IDX = GP + (GP - 1 - g);
    if (g < G) begin : g_real
      localparam int unsigned LO  = g * LEAF;
      localparam int unsigned LEN = (NB - LO < LEAF) ? (NB - LO) : LEAF;
      rns_leaf_mux #(.L(LEN), .J0(LO), .M(M)) u_leaf (
        .bits(b[LO +: LEN]), .res(node_m[IDX]), .any(node_any[IDX])
      );
    end else begin : g_pad
      assign node_m[IDX]   = '0;
      assign node_any[IDX] = 1'b0;
    end
  end

  for (genvar i = 1; i < GP; i++) begin : g_node
    rns_prefix_node #(.M(M)) u_node (
      .m_hi(node_m[2*i]),     .m_lo(node_m[2*i+1]),
      .any_hi(node_any[2*i]), .any_lo(node_any[2*i+1]),
      .m_out(node_m[i]),      .any_out(node_any[i])
    );
  end

  assign r = node_m[1];
endmodule
