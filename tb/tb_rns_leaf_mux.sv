// tb_rns_leaf_mux: exhaustive check of the pre-processing multiplexers: a
// two-bit group at bit 0 modulo 7, a three-bit group at bit 4 modulo 7 and a
// three-bit group at bit 6 modulo 11, each against (bits << J0) mod M, plus
// the OR output.
module tb_rns_leaf_mux;
  logic [1:0] b2;  logic [2:0] r2;  logic any2;
  logic [2:0] b3;  logic [2:0] r3;  logic any3;
  logic [2:0] b4;  logic [3:0] r4;  logic any4;
  int checks = 0, failures = 0;
  rns_leaf_mux #(.L(2), .J0(0), .M(7))  u2 (.bits(b2), .res(r2), .any(any2));
  rns_leaf_mux #(.L(3), .J0(4), .M(7))  u3 (.bits(b3), .res(r3), .any(any3));
  rns_leaf_mux #(.L(3), .J0(6), .M(11)) u4 (.bits(b4), .res(r4), .any(any4));
  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 8; v++) begin
      b2 = 2'(v); b3 = 3'(v); b4 = 3'(v);
      #1;
      checks += 5;
      if (v < 4 && int'(r2) != (v % 7)) begin failures++; $display("FAIL u2 %0d -> %0d", v, r2); end
      if (int'(r3) != ((v << 4) % 7)) begin failures++; $display("FAIL u3 %0d -> %0d", v, r3); end
      if (int'(r4) != ((v << 6) % 11)) begin failures++; $display("FAIL u4 %0d -> %0d", v, r4); end
      if (any3 !== (v != 0)) begin failures++; $display("FAIL any3"); end
      if (v < 4 && any2 !== (v != 0)) begin failures++; $display("FAIL any2"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
