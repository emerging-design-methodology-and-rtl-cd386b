// tb_emerging_top: end-to-end test of the whole design at its default sizes
// (no parameter overrides), through the top-level ports only.
//
// RNS part: every 8-bit and 10-bit input of the two converters; every
// residue pair and modulus of the 4-bit adder/subtractor in both modes; every
// number of the (5,7,11) range for the mixed-radix digits; every number of
// the (2,3,5) range for base extension to 7; every number of the (3,5,2)
// range but the last for scaling by two.
// QCA part: every input of f1 and f2; then the pipelined array runs, back to
// back, all 10-bit square roots, all 5-bit squares and a sweep of multiplies
// and divides, checked N = 5 clocks after issue.
// Reference values are computed here with integer arithmetic. Each mechanism
// of the design is counted and must occur at least once: modular-adder
// correction and no correction in both modes, converter combine nodes that
// bypass and that add, scaling of odd and of even numbers, array levels that
// restore (F = 0) and that keep (F = 1) in subtract mode, conditional adds
// skipped and taken in add mode, each array operation, and a full pipe (five
// operations in flight).
module tb_emerging_top;
  logic clk = 0, rst_n = 0;
  logic [7:0] b2r8_in;   logic [2:0] b2r8_res;
  logic [9:0] b2r10_in;  logic [2:0] b2r10_res;
  logic [3:0] as_a, as_b, as_m, as_sum; logic as_c0;
  logic [2:0][3:0] mrc_x, mrc_dig;
  logic [2:0][2:0] ext_x;  logic [2:0] ext_res;
  logic [2:0][2:0] sc_x, sc_q;
  logic [3:0] f1_in; logic f1_out; logic [1:0] f1_nodes;
  logic [2:0] f2_in; logic f2_out, f2_node;
  logic arr_in_valid, arr_x, arr_out_valid;
  logic [0:10] arr_a, arr_s;
  logic [0:2] arr_b_top, arr_c_top;
  logic [2:5] arr_b_new, arr_c_new;
  logic [1:5] arr_p, arr_f;

  emerging_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // mechanism counters
  int m_add_fix = 0, m_add_nofix = 0, m_sub_fix = 0, m_sub_nofix = 0;
  int m_node_add = 0, m_node_bypass = 0, m_scale_odd = 0, m_scale_even = 0;
  int m_restore = 0, m_keep = 0, m_skip_add = 0, m_take_add = 0;
  int m_sqrt = 0, m_square = 0, m_mul = 0, m_div = 0, m_full_pipe = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  typedef struct { int es; int ef; int t; bit sub; } exp_t;
  exp_t q[$];
  int in_flight = 0;

  task automatic issue(input logic xx, input int a, input logic [0:2] bt, ct,
                       input logic [2:5] bn, input logic [1:5] p, input int es, input int ef);
    exp_t e;
    arr_in_valid = 1; arr_x = xx; arr_a = 11'(a); arr_b_top = bt; arr_c_top = ct;
    arr_b_new = bn; arr_c_new = '0; arr_p = p;
    e.es = es; e.ef = ef; e.t = cycle; e.sub = xx;
    q.push_back(e);
    @(posedge clk); #1;
  endtask

  always @(negedge clk) if (rst_n) begin
    if (q.size() >= 5 && arr_in_valid) m_full_pipe++;
    if (arr_out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin failures++; $display("FAIL unexpected out_valid"); end
      else begin
        e = q.pop_front();
        if (int'(arr_s) != e.es || int'(arr_f) != e.ef || cycle - e.t != 5) begin
          failures++;
          if (failures < 20)
            $display("FAIL array s=%0d exp %0d f=%0d exp %0d lat %0d", arr_s, e.es, arr_f, e.ef, cycle - e.t);
        end
        for (int k = 1; k <= 5; k++)
          if (e.sub) begin if (arr_f[k]) m_keep++; else m_restore++; end
          else begin if (arr_f[k]) m_take_add++; else m_skip_add++; end
      end
    end
  end

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r, h;
    arr_in_valid = 0; arr_x = 0; arr_a = '0; arr_b_top = '0; arr_c_top = '0;
    arr_b_new = '0; arr_c_new = '0; arr_p = '0;
    b2r8_in = '0; b2r10_in = '0; as_a = '0; as_b = '0; as_m = 4'd1; as_c0 = 0;
    mrc_x = '0; ext_x = '0; sc_x = '0; f1_in = '0; f2_in = '0;

    // ---------------- RNS part ----------------
    for (int v = 0; v < 1024; v++) begin
      b2r8_in = 8'(v); b2r10_in = 10'(v);
      #1;
      if (v < 256) chk(int'(b2r8_res) == v % 7, $sformatf("b2r8 %0d", v));
      chk(int'(b2r10_res) == v % 7, $sformatf("b2r10 %0d", v));
      // root combine node of the 8-bit converter adds when both nibbles are non-zero
      if (v < 256) begin
        if ((v >> 4) != 0 && (v & 15) != 0) m_node_add++; else m_node_bypass++;
      end
    end
    for (int mm = 2; mm < 16; mm++)
      for (int x = 0; x < mm; x++)
        for (int y = 0; y < mm; y++)
          for (int op = 0; op < 2; op++) begin
            as_a = 4'(x); as_b = 4'(y); as_m = 4'(mm); as_c0 = op[0];
            #1;
            chk(int'(as_sum) == (op ? (x - y + mm) % mm : (x + y) % mm), "addsub");
            if (op == 0) begin if (x + y >= mm) m_add_fix++; else m_add_nofix++; end
            else begin if (x < y) m_sub_fix++; else m_sub_nofix++; end
          end
    for (int v = 0; v < 385; v++) begin
      mrc_x[0] = 4'(v % 5); mrc_x[1] = 4'(v % 7); mrc_x[2] = 4'(v % 11);
      #1;
      chk(int'(mrc_dig[0]) + 5 * int'(mrc_dig[1]) + 35 * int'(mrc_dig[2]) == v
          && mrc_dig[0] < 5 && mrc_dig[1] < 7 && mrc_dig[2] < 11, $sformatf("mrc %0d", v));
    end
    for (int v = 0; v < 30; v++) begin
      ext_x[0] = 3'(v % 2); ext_x[1] = 3'(v % 3); ext_x[2] = 3'(v % 5);
      sc_x[0] = 3'(v % 3); sc_x[1] = 3'(v % 5); sc_x[2] = 3'(v % 2);
      #1;
      chk(int'(ext_res) == v % 7, $sformatf("ext %0d", v));
      if (v < 29) begin
        h = (v + 1) / 2;
        if (v % 2 == 0) begin h = v / 2; m_scale_even++; end else m_scale_odd++;
        chk(int'(sc_q[0]) == h % 3 && int'(sc_q[1]) == h % 5 && int'(sc_q[2]) == h % 2,
            $sformatf("scale %0d", v));
      end
    end

    // ---------------- QCA logic functions ----------------
    for (int v = 0; v < 16; v++) begin
      f1_in = 4'(v); f2_in = 3'(v % 8);
      #1;
      chk(f1_out == (v inside {2, 3, 5, 7, 8, 12, 13, 14}), $sformatf("f1 %0d", v));
      chk(f1_nodes == {f1_in[3] ^ (~f1_in[2] & f1_in[1]),
                       (f1_in[2] & f1_in[0]) ^ (f1_in[3] & ~f1_in[1] & f1_in[0])}, "f1 nodes");
      chk(f2_node == (~f2_in[0] ^ (f2_in[2] & f2_in[1])), "f2 node");
      if (v < 8) chk(f2_out == (v inside {0, 2, 3, 4, 7}), $sformatf("f2 %0d", v));
    end

    // ---------------- pipelined array ----------------
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    chk(!arr_out_valid, "array valid after reset");
    for (int a = 0; a < 1024; a++) begin
      r = 0;
      while ((r + 1) * (r + 1) <= a) r++;
      issue(1'b1, a, 3'b001, 3'b010, '1, '0, a - r * r, r);
      m_sqrt++;
    end
    for (int p = 0; p < 32; p++) begin
      issue(1'b0, 0, 3'b001, 3'b010, '1, 5'(p), p * p, p);
      m_square++;
    end
    for (int b = 0; b < 8; b++)
      for (int p = 0; p < 32; p++)
        if (16 * b * p < 2048) begin
          issue(1'b0, 0, 3'(b), 3'(b), '0, 5'(p), 16 * b * p, p);
          m_mul++;
        end
    for (int dv = 1; dv < 8; dv++)
      for (int a = 0; a < 64; a++)
        if (a / dv < 32) begin
          issue(1'b1, a * 16, 3'(dv), 3'(dv), '0, '0, (a % dv) * 16, a / dv);
          m_div++;
        end
    arr_in_valid = 0;
    repeat (8) @(posedge clk);
    #1;
    chk(q.size() == 0, "all array results returned");

    $display("mechanisms: add_fix=%0d add_nofix=%0d sub_fix=%0d sub_nofix=%0d node_add=%0d node_bypass=%0d",
             m_add_fix, m_add_nofix, m_sub_fix, m_sub_nofix, m_node_add, m_node_bypass);
    $display("            scale_odd=%0d scale_even=%0d restore=%0d keep=%0d skip_add=%0d take_add=%0d",
             m_scale_odd, m_scale_even, m_restore, m_keep, m_skip_add, m_take_add);
    $display("            sqrt=%0d square=%0d multiply=%0d divide=%0d full_pipe=%0d",
             m_sqrt, m_square, m_mul, m_div, m_full_pipe);
    chk(m_add_fix > 0 && m_add_nofix > 0 && m_sub_fix > 0 && m_sub_nofix > 0, "addsub mechanisms");
    chk(m_node_add > 0 && m_node_bypass > 0, "combine node mechanisms");
    chk(m_scale_odd > 0 && m_scale_even > 0, "scaling mechanisms");
    chk(m_restore > 0 && m_keep > 0 && m_skip_add > 0 && m_take_add > 0, "array row mechanisms");
    chk(m_sqrt > 0 && m_square > 0 && m_mul > 0 && m_div > 0 && m_full_pipe > 0, "array operations");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
