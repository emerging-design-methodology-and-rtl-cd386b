// tb_qca_f1: exhaustive check of the majority-gate network for
// f1 = sum of minterms (2,3,5,7,8,12,13,14) (a = MSB) and of its two inner
// XOR-tree nodes n1 = a ^ ~b c and n2 = b d ^ a ~c d.
module tb_qca_f1;
  logic a, b, c, d, n1, n2, f1;
  int checks = 0, failures = 0;
  localparam logic [15:0] MINTERMS = (16'b1 << 2) | (16'b1 << 3) | (16'b1 << 5) | (16'b1 << 7) |
                                     (16'b1 << 8) | (16'b1 << 12) | (16'b1 << 13) | (16'b1 << 14);
  qca_f1 dut (.*);
  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      checks += 3;
      if (f1 !== MINTERMS[v]) begin failures++; $display("FAIL f1(%0d)=%b", v, f1); end
      if (n1 !== (a ^ (~b & c))) begin failures++; $display("FAIL n1(%0d)", v); end
      if (n2 !== ((b & d) ^ (a & ~c & d))) begin failures++; $display("FAIL n2(%0d)", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
