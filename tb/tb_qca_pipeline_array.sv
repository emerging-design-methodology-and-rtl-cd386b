// tb_qca_pipeline_array: self-checking testbench for the pipelined QCA
// cellular array at its default size (N = 5 levels, 11-cell last level).
//
// It streams operations into the array back to back, one per clock, and
// checks every result N clocks later against integer arithmetic computed in
// the testbench: all 1024 square roots of 10-bit numbers, all 32 squares of
// 5-bit numbers, every 3-bit x 5-bit multiplication whose scaled product fits
// the last level, and every 7-bit / 3-bit division whose
// quotient fits the N result bits. It also
// checks the latency (results appear exactly N clocks after issue) and that
// out_valid is low while the pipe is empty.
module tb_qca_pipeline_array;
  localparam int N = 5;
  localparam int W = 2 * N + 1;

  logic clk = 0, rst_n = 0;
  logic in_valid, x;
  logic [0:2*N] a_in;
  logic [0:2] b_top, c_top;
  logic [2:N] b_new, c_new;
  logic [1:N] p_in;
  logic out_valid;
  logic [0:2*N] s_out;
  logic [1:N] f_out;

  qca_pipeline_array #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // expected-result queue: {kind, expect_s, expect_f, issue cycle}
  typedef struct { int kind; int es; int ef; int t; } exp_t;
  exp_t q[$];
  int n_sqrt = 0, n_sq = 0, n_mul = 0, n_div = 0;

  task automatic issue(input logic xx, input logic [0:2*N] a, input logic [0:2] bt, ct,
                       input logic [2:N] bn, cn, input logic [1:N] p,
                       input int kind, input int es, input int ef);
    exp_t e;
    in_valid = 1; x = xx; a_in = a; b_top = bt; c_top = ct; b_new = bn; c_new = cn; p_in = p;
    e.kind = kind; e.es = es; e.ef = ef; e.t = cycle;
    q.push_back(e);
    @(posedge clk); #1;
  endtask

  // check on the falling edge, after the registers settle
  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      exp_t e;
      if (q.size() == 0) begin
        failures++; $display("FAIL: out_valid with nothing issued");
      end else begin
        e = q.pop_front();
        checks++;
        if (int'(s_out) != e.es || (e.ef >= 0 && int'(f_out) != e.ef)) begin
          failures++;
          if (failures < 10)
            $display("FAIL kind=%0d s=%0d exp %0d f=%0d exp %0d", e.kind, s_out, e.es, f_out, e.ef);
        end
        checks++;
        if (cycle - e.t != N) begin
          failures++; $display("FAIL latency %0d", cycle - e.t);
        end
      end
    end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r, rem, sq, prod;
    in_valid = 0; x = 0; a_in = '0; b_top = '0; c_top = '0; b_new = '0; c_new = '0; p_in = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    checks++;
    if (out_valid) begin failures++; $display("FAIL: valid after reset"); end

    // square root of every 10-bit radicand
    for (int a = 0; a < 1024; a++) begin
      r = 0;
      while ((r + 1) * (r + 1) <= a) r++;
      rem = a - r * r;
      issue(1'b1, (2*N+1)'(a), 3'b001, 3'b010, '1, '0, '0, 0, rem, r);
      n_sqrt++;
    end
    // square of every 5-bit operand
    for (int p = 0; p < 32; p++) begin
      sq = p * p;
      issue(1'b0, '0, 3'b001, 3'b010, '1, '0, (N)'(p), 1, sq, p);
      n_sq++;
    end
    // multiplication: 3-bit multiplicand, 5-bit multiplier
    for (int b = 0; b < 8; b++)
      for (int p = 0; p < 32; p++) begin
        prod = b * p;
        if (16 * prod < (1 << W)) begin
          issue(1'b0, '0, 3'(b), 3'(b), '0, '0, (N)'(p), 2, 16 * prod, p);
          n_mul++;
        end
      end
    // division: 7-bit dividend in the top seven positions, 3-bit divisor
    for (int dv = 1; dv < 8; dv++)
      for (int a = 0; a < 128; a++) if (a / dv < (1 << N)) begin
        issue(1'b1, (2*N+1)'(a * 16), 3'(dv), 3'(dv), '0, '0, '0, 3,
              (a % dv) * 16, a / dv);
        n_div++;
      end
    in_valid = 0;
    repeat (N + 3) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL: %0d results missing", q.size()); end
    $display("operations: sqrt=%0d square=%0d multiply=%0d divide=%0d", n_sqrt, n_sq, n_mul, n_div);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
