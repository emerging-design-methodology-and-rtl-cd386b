// rns_leaf_mux: pre-processing operator of the parallel-prefix
// binary-to-residue converter.
//
// For a group of L consecutive input bits b[J0+L-1 .. J0] the residue of
// their weighted sum, | sum_i 2^(J0+i) b[J0+i] |_M, is one of 2^L constants.
// The group bits drive the select lines of a 2^L-input multiplexer whose data
// inputs are those constants, worked out at elaboration: input Y_s holds
// | sum over set bits i of s of |2^(J0+i)|_M |_M. L = 2 is the two-bit
// operator (4-input mux), L = 3 the three-bit operator (8-input mux); L = 1
// degenerates to an AND with the constant |2^J0|_M.
// The OR of the group bits is brought out as well; the prefix combine nodes
// use it as their select line.
//
// Interface: bits (L) in; res (residue, RW bits) and any out. Combinational,
// one multiplexer delay.
module rns_leaf_mux
  import rns_pkg::*;
#(
  parameter int unsigned L  = 2,
  parameter int unsigned J0 = 0,
  parameter int unsigned M  = 7,
  localparam int unsigned RW = res_width(M)
) (
  input  logic [L-1:0]  bits,
  output logic [RW-1:0] res,
  output logic          any
);
  function automatic int unsigned entry(input int unsigned s);
    int unsigned acc;
    acc = 0;
    for (int unsigned i = 0; i < L; i++)
      if (s[i]) acc = (acc + pow_mod(2, J0 + i, M)) % M;
    return acc;
  endfunction

  logic [RW-1:0] table_y [2**L];
  for (genvar s = 0; s < 2**L; s++) begin : g_y
    assign table_y[s] = RW'(entry(s));
  end

  assign res = table_y[bits];
  assign any = |bits;
endmodule
