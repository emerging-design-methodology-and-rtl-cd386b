// tb_rns_prefix_node: exhaustive check of the prefix combine node modulo 7
// and modulo 11 over every pair of residues and every combination of the two
// group-OR inputs (a group whose OR is 0 contributes residue 0).
module tb_rns_prefix_node;
  logic [2:0] h7, l7, o7;  logic ah, al, ao7;
  logic [3:0] h11, l11, o11; logic ao11;
  int checks = 0, failures = 0;
  rns_prefix_node #(.M(7))  u7  (.m_hi(h7), .m_lo(l7), .any_hi(ah), .any_lo(al), .m_out(o7), .any_out(ao7));
  rns_prefix_node #(.M(11)) u11 (.m_hi(h11), .m_lo(l11), .any_hi(ah), .any_lo(al), .m_out(o11), .any_out(ao11));
  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int eh, el;
    for (int s = 0; s < 4; s++)
      for (int h = 0; h < 11; h++)
        for (int l = 0; l < 11; l++) begin
          {ah, al} = 2'(s);
          // a group with no set bit has residue 0 by construction
          eh = ah ? h : 0; el = al ? l : 0;
          h11 = 4'(eh); l11 = 4'(el);
          h7 = 3'(eh % 7); l7 = 3'(el % 7);
          #1;
          checks += 3;
          if (int'(o11) != (eh + el) % 11) begin failures++; $display("FAIL m11 %0d %0d", eh, el); end
          if (int'(o7) != ((eh % 7) + (el % 7)) % 7) begin failures++; $display("FAIL m7"); end
          if (ao7 !== (ah | al) || ao11 !== (ah | al)) begin failures++; $display("FAIL any"); end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
