// qca_pipeline_array: generalized pipelined cellular arithmetic array built
// from QCA majority-gate cells (qca_arith_cell, qca_control_cell).
//
// The array has N levels. Level k (k = 1..N) is a row of 2k+1 arithmetic
// cells plus one control cell, so the whole array has N(N+2) arithmetic cells
// and N control cells; the last level is 2N+1 cells wide. Columns are
// numbered by position 0..2N, position 0 being the most significant; level k
// occupies positions 0..2k. Inside a level the carry ripples from position 2k
// (carry-in = X) to position 0, whose carry goes to the control cell; the
// control cell's F then tells every cell of the level to keep its sum (F=1)
// or pass its A bit through (F=0). A registered latch stage follows each
// level, so one operation enters per clock and leaves N clocks later.
//
// Data movement between levels (this wiring is this design's own
// reconstruction from the cell equations and the square-root subtrahend
// table; it is not a copy of a printed array drawing):
//   * A moves straight down: the A input of position p at level k is the S
//     output of position p at level k-1. Positions a level adds on the right
//     (2k-1 and 2k; 0..2 at level 1) take fresh bits from a_in.
//   * The (B, C) pair moves diagonally: position p at level k takes the D, E
//     outputs of position p-1 at level k-1. Position 0 of levels 2..N takes
//     (0,0); position 2k of level k takes the fresh pair (b_new[k], c_new[k]);
//     level 1 takes b_top/c_top.
// Because D,E map (B,C)=(0,1) to (F,F) and (1,0) to (0,1), feeding
// b_top=001, c_top=010 and b_new=1..1, c_new=0..0 makes level k subtract or
// add the pattern 0..0 F1..F(k-1) 0 1, i.e. 4Q+1 for the root/operand bits
// Q found so far.
//
// Operating modes (operands are unsigned):
//   square root  X=1, p_in=0, a_in = 0 & radicand (2N bits), pattern above.
//                f_out = root (F1 = MSB), s_out = remainder (position 2N = LSB).
//   squaring     X=0, a_in=0, p_in = operand (N bits, p_in[1] = MSB),
//                pattern above; s_out = square.
//   multiply     X=0, a_in=0, b_top=c_top = 3-bit multiplicand, b_new=c_new=0,
//                p_in = multiplier; s_out = 16 * product. Exact while
//                16*product < 2^(2N+1).
//   divide       X=1, p_in=0, b_top=c_top = 3-bit divisor, b_new=c_new=0,
//                a_in = 0 & dividend; f_out = floor(dividend / (divisor*16)),
//                s_out = remainder. Exact while the quotient fits N bits,
//                i.e. a_in < 2^(N+4) * divisor.
// Plain addition and subtraction are the arithmetic cell's own function
// (X = 0 / X = 1 with F = 1); at array level an add is a multiply with a
// single P bit set.
// The array has no separate multiplier or square-root cells: the same cell
// serves all modes and only the edge inputs differ.
// Timing: out_valid/s_out/f_out follow in_valid and the operands by N clocks;
// a new operation may enter every clock. Reset (rst_n low, synchronous)
// clears all pipeline registers.
module qca_pipeline_array #(
  parameter int unsigned N = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic         x,
  input  logic [0:2*N] a_in,
  input  logic [0:2]   b_top,
  input  logic [0:2]   c_top,
  input  logic [2:N]   b_new,
  input  logic [2:N]   c_new,
  input  logic [1:N]   p_in,
  output logic         out_valid,
  output logic [0:2*N] s_out,
  output logic [1:N]   f_out
);
  localparam int unsigned W = 2 * N + 1;

  typedef struct packed {
    logic         v;
    logic         x;
    logic [0:W-1] a;   // S of used positions, raw a_in bits for the rest
    logic [0:W-1] b;   // D outputs of the level (B of the next level, shifted)
    logic [0:W-1] c;   // E outputs of the level
    logic [1:N]   p;
    logic [2:N]   bn;
    logic [2:N]   cn;
    logic [1:N]   f;
  } stage_t;

  stage_t st  [0:N];   // st[0]: operands as applied; st[k]: latch after level k
  stage_t nxt [1:N];   // combinational result of level k

  always_comb begin
    st[0]    = '0;
    st[0].v  = in_valid;
    st[0].x  = x;
    st[0].a  = a_in;
    st[0].p  = p_in;
    st[0].bn = b_new;
    st[0].cn = c_new;
  end

  for (genvar k = 1; k <= N; k++) begin : g_lvl
    localparam int unsigned R = 2 * k;   // rightmost position of this level
    logic [0:R]   ca, cb, cc, cs, cd, ce;
    logic [0:R+1] cy;
    logic         fk, xk;

    assign cy[R+1] = st[k-1].x;

    for (genvar p = 0; p <= R; p++) begin : g_cell
      assign ca[p] = st[k-1].a[p];
      if (k == 1) begin : g_top
        assign cb[p] = b_top[p];
        assign cc[p] = c_top[p];
      end else if (p == 0) begin : g_left
        assign cb[p] = 1'b0;
        assign cc[p] = 1'b0;
      end else if (p == R) begin : g_right
        assign cb[p] = st[k-1].bn[k];
        assign cc[p] = st[k-1].cn[k];
      end else begin : g_diag
        assign cb[p] = st[k-1].b[p-1];
        assign cc[p] = st[k-1].c[p-1];
      end

      qca_arith_cell u_cell (
        .a (ca[p]), .b(cb[p]), .c(cc[p]), .x(st[k-1].x), .f(fk), .c1(cy[p+1]),
        .s (cs[p]), .c0(cy[p]), .d(cd[p]), .e(ce[p])
      );
    end

    qca_control_cell u_ctl (
      .x(st[k-1].x), .p(st[k-1].p[k]), .c0(cy[0]), .f(fk), .x_out(xk)
    );

    always_comb begin
      nxt[k]      = st[k-1];
      nxt[k].x    = xk;
      nxt[k].f[k] = fk;
      nxt[k].b    = '0;
      nxt[k].c    = '0;
      for (int q = 0; q <= R; q++) begin
        nxt[k].a[q] = cs[q];
        nxt[k].b[q] = cd[q];
        nxt[k].c[q] = ce[q];
      end
    end

    always_ff @(posedge clk) begin
      if (!rst_n) st[k] <= '0;
      else        st[k] <= nxt[k];
    end
  end

  assign out_valid = st[N].v;
  assign s_out     = st[N].a;
  assign f_out     = st[N].f;
endmodule
