// tb_qca_maj: exhaustive check of the majority gate against its truth table
// (output 1 when at least two inputs are 1).
module tb_qca_maj;
  logic a, b, c, y;
  int checks = 0, failures = 0;
  qca_maj dut (.*);
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
      checks++;
      if (y !== (int'(a) + int'(b) + int'(c) >= 2)) begin
        failures++; $display("FAIL M(%b,%b,%b)=%b", a, b, c, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
