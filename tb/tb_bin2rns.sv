// tb_bin2rns: exhaustive check of the parallel-prefix binary-to-residue
// converter: 8-bit input modulo 7 with two-bit groups (the default), 10-bit
// input modulo 7 with three-bit groups, and 10-bit input modulo 11 and
// modulo 13 with three-bit groups, each against b mod M. Includes the two
// worked values 244 mod 7 = 6 and 255 mod 7 = 3.
module tb_bin2rns;
  logic [7:0] b8;  logic [2:0] r8;
  logic [9:0] b10; logic [2:0] r10; logic [3:0] r11, r13;
  int checks = 0, failures = 0;
  bin2rns dut (.b(b8), .r(r8));
  bin2rns #(.NB(10), .M(7),  .LEAF(3)) u10 (.b(b10), .r(r10));
  bin2rns #(.NB(10), .M(11), .LEAF(3)) u11 (.b(b10), .r(r11));
  bin2rns #(.NB(10), .M(13), .LEAF(2)) u13 (.b(b10), .r(r13));
  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 1024; v++) begin
      b8 = 8'(v); b10 = 10'(v);
      #1;
      checks += 3;
      if (v < 256) begin
        checks++;
        if (int'(r8) != v % 7) begin failures++; $display("FAIL 8b %0d -> %0d", v, r8); end
      end
      if (int'(r10) != v % 7)  begin failures++; $display("FAIL 10b m7 %0d -> %0d", v, r10); end
      if (int'(r11) != v % 11) begin failures++; $display("FAIL 10b m11 %0d -> %0d", v, r11); end
      if (int'(r13) != v % 13) begin failures++; $display("FAIL 10b m13 %0d -> %0d", v, r13); end
    end
    b8 = 8'd244; #1; checks++;
    if (r8 != 3'd6) begin failures++; $display("FAIL 244"); end
    b8 = 8'd255; #1; checks++;
    if (r8 != 3'd3) begin failures++; $display("FAIL 255"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
