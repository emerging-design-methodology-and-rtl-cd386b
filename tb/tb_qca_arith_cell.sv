// tb_qca_arith_cell: exhaustive check (all 64 input combinations) of the
// arithmetic cell against an arithmetic model: with X = 0 it adds
// A + B + C1, with X = 1 it adds A + ~B + C1 (one bit of A - B); S is the sum
// bit when F = 1 and A when F = 0; C0 is the carry; D = C(B+F) and
// E = (B+C)(B+F) are checked through the operand-forwarding rules
// (B,C) = (b,b) -> (b,b), (0,1) -> (F,F), (1,0) -> (0,1).
module tb_qca_arith_cell;
  logic a, b, c, x, f, c1, s, c0, d, e;
  int checks = 0, failures = 0;
  qca_arith_cell dut (.*);
  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int total;
    logic ed, ee;
    for (int v = 0; v < 64; v++) begin
      {a, b, c, x, f, c1} = 6'(v);
      #1;
      total = int'(a) + int'(b ^ x) + int'(c1);
      case ({b, c})
        2'b00: {ed, ee} = 2'b00;
        2'b11: {ed, ee} = 2'b11;
        2'b01: {ed, ee} = {f, f};
        default: {ed, ee} = 2'b01;
      endcase
      checks += 4;
      if (s !== (f ? total[0] : a)) begin failures++; $display("FAIL s v=%0d", v); end
      if (c0 !== total[1]) begin failures++; $display("FAIL c0 v=%0d", v); end
      if (d !== ed) begin failures++; $display("FAIL d v=%0d", v); end
      if (e !== ee) begin failures++; $display("FAIL e v=%0d", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
