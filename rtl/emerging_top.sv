// emerging_top: the residue-number-system (RNS) arithmetic blocks and the
// quantum-dot cellular automata (QCA) majority-logic blocks of this design,
// side by side, each with its own ports.
//
// RNS part (combinational):
//   * u_b2r8  : 8-bit binary to residue modulo 7, two-bit pre-processing
//               multiplexers and a two-layer prefix tree.
//   * u_b2r10 : 10-bit binary to residue modulo 7 in the preferred
//               arrangement (three 3-bit multiplexers, three combine nodes).
//   * u_addsub: 4-bit modular adder/subtractor, modulus on a port.
//   * u_mrc   : mixed-radix digits over the base (5, 7, 11).
//   * u_ext   : base extension from (2, 3, 5) to the modulus 7.
//   * u_scale : scaling by two over the base (3, 5, 2).
// QCA part:
//   * u_f1, u_f2 : the two example functions mapped to majority gates.
//   * u_array    : the 5-level pipelined cellular array (square root of
//                  10 bits, square of 5 bits, multiply, divide); clocked,
//                  latency 5, one operation per clock.
// The blocks share nothing but the clock and reset of the array; the moduli
// and sizes chosen for the instances are those of the worked examples.
module emerging_top (
  input  logic                 clk,
  input  logic                 rst_n,
  // binary-to-residue converters
  input  logic [7:0]           b2r8_in,
  output logic [2:0]           b2r8_res,
  input  logic [9:0]           b2r10_in,
  output logic [2:0]           b2r10_res,
  // modular adder/subtractor
  input  logic [3:0]           as_a,
  input  logic [3:0]           as_b,
  input  logic [3:0]           as_m,
  input  logic                 as_c0,
  output logic [3:0]           as_sum,
  // mixed-radix digits over (5, 7, 11)
  input  logic [2:0][3:0]      mrc_x,
  output logic [2:0][3:0]      mrc_dig,
  // base extension (2, 3, 5) -> 7
  input  logic [2:0][2:0]      ext_x,
  output logic [2:0]           ext_res,
  // scaling by two over (3, 5, 2)
  input  logic [2:0][2:0]      sc_x,
  output logic [2:0][2:0]      sc_q,
  // QCA example functions
  input  logic [3:0]           f1_in,     // {a, b, c, d}
  output logic                 f1_out,
  output logic [1:0]           f1_nodes,  // {n1, n2} inner XOR-tree nodes
  input  logic [2:0]           f2_in,     // {a, b, c}
  output logic                 f2_out,
  output logic                 f2_node,   // inner XOR-tree node n
  // QCA pipelined cellular array
  input  logic                 arr_in_valid,
  input  logic                 arr_x,
  input  logic [0:10]          arr_a,
  input  logic [0:2]           arr_b_top,
  input  logic [0:2]           arr_c_top,
  input  logic [2:5]           arr_b_new,
  input  logic [2:5]           arr_c_new,
  input  logic [1:5]           arr_p,
  output logic                 arr_out_valid,
  output logic [0:10]          arr_s,
  output logic [1:5]           arr_f
);
  bin2rns #(.NB(8),  .M(7), .LEAF(2)) u_b2r8  (.b(b2r8_in),  .r(b2r8_res));
  bin2rns #(.NB(10), .M(7), .LEAF(3)) u_b2r10 (.b(b2r10_in), .r(b2r10_res));

  rns_addsub #(.W(4)) u_addsub (.a(as_a), .b(as_b), .m(as_m), .c0(as_c0), .sum(as_sum));

  rns_mrc #(.NMOD(3), .M('{5, 7, 11}), .RW(4)) u_mrc (.x(mrc_x), .dig(mrc_dig));

  rns_base_extend #(.NMOD(3), .M('{2, 3, 5}), .MEXT(7), .RW(3)) u_ext (
    .x(ext_x), .x_ext(ext_res)
  );

  rns_scale2 #(.NMOD(3), .M('{3, 5, 2}), .RW(3)) u_scale (.x(sc_x), .q(sc_q));

  qca_f1 u_f1 (.a(f1_in[3]), .b(f1_in[2]), .c(f1_in[1]), .d(f1_in[0]),
               .n1(f1_nodes[1]), .n2(f1_nodes[0]), .f1(f1_out));
  qca_f2 u_f2 (.a(f2_in[2]), .b(f2_in[1]), .c(f2_in[0]), .n(f2_node), .f2(f2_out));

  qca_pipeline_array #(.N(5)) u_array (
    .clk(clk), .rst_n(rst_n), .in_valid(arr_in_valid), .x(arr_x), .a_in(arr_a),
    .b_top(arr_b_top), .c_top(arr_c_top), .b_new(arr_b_new), .c_new(arr_c_new),
    .p_in(arr_p), .out_valid(arr_out_valid), .s_out(arr_s), .f_out(arr_f)
  );
endmodule
