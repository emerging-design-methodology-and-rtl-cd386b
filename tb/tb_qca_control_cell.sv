// tb_qca_control_cell: exhaustive check of the control cell: F follows the
// carry c0 when x = 1 and the operand bit p when x = 0; x passes through.
module tb_qca_control_cell;
  logic x, p, c0, f, x_out;
  int checks = 0, failures = 0;
  qca_control_cell dut (.*);
  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 8; v++) begin
      {x, p, c0} = 3'(v);
      #1;
      checks += 2;
      if (f !== (x ? c0 : p)) begin failures++; $display("FAIL f x=%b p=%b c0=%b", x, p, c0); end
      if (x_out !== x) begin failures++; $display("FAIL x_out"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
