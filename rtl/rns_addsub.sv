// rns_addsub: modular adder/subtractor for one residue channel.
//
//   c0 = 0:  sum = |a + b|_m  = a+b   if a+b < m,  else a+b-m
//   c0 = 1:  sum = |a - b|_m  = a-b   if a-b >= 0, else a-b+m
//
// Two W-bit binary adders do the work. The first computes a + b (c0=0) or
// a + ~b + 1 = a - b (c0=1), giving Sa and carry Ca. The second applies the
// correction: Sa + ~m + 1 = Sa - m when adding, Sa + m when subtracting,
// giving Sb and carry Cb. The operand multiplexers choose b or ~b and ~m or m
// by c0, and the second adder's carry-in is ~c0. The result multiplexer takes
// Sb when the correction is needed: when adding that is Ca OR Cb (a+b >= m),
// when subtracting it is ~Ca (a borrow occurred); a fourth multiplexer picks
// between those two conditions by c0. So the cell is two adders, four 2:1
// multiplexers and one OR gate.
//
// Interface: a, b, m (W bits each; a and b must already be residues, < m),
// c0 (0 add, 1 subtract) in; sum out. Combinational. The default W = 4 gives
// the 17-pin cell (4+4+4+1 inputs, 4 outputs).
module rns_addsub #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] m,
  input  logic         c0,
  output logic [W-1:0] sum
);
  logic [W-1:0] b_sel, m_sel, sa, sb;
  logic         ca, cb, fix;

  always_comb begin
    b_sel     = c0 ? ~b : b;
    m_sel     = c0 ? m : ~m;
    {ca, sa}  = {1'b0, a} + {1'b0, b_sel} + {{W{1'b0}}, c0};
    {cb, sb}  = {1'b0, sa} + {1'b0, m_sel} + {{W{1'b0}}, ~c0};
    fix       = c0 ? ~ca : (ca | cb);
    sum       = fix ? sb : sa;
  end
endmodule
