// tb_qca_f2: exhaustive check of the majority-gate network for
// f2 = sum of minterms (0,2,3,4,7) (a = MSB) and its inner node n = ~c ^ ab.
module tb_qca_f2;
  logic a, b, c, n, f2;
  int checks = 0, failures = 0;
  localparam logic [7:0] MINTERMS = 8'b1001_1101;  // bits 0,2,3,4,7
  qca_f2 dut (.*);
  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks += 2;
      if (f2 !== MINTERMS[v]) begin failures++; $display("FAIL f2(%0d)=%b", v, f2); end
      if (n !== (~c ^ (a & b))) begin failures++; $display("FAIL n(%0d)", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
