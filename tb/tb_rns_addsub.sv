// tb_rns_addsub: exhaustive check of the 4-bit modular adder/subtractor for
// every modulus 2..15, every pair of residues a, b < m and both operations,
// against (a+b) mod m and (a-b) mod m; plus the sample point a=4, b=2,
// m=13, subtract -> 2.
module tb_rns_addsub;
  logic [3:0] a, b, m, sum;
  logic c0;
  int checks = 0, failures = 0;
  rns_addsub dut (.*);
  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int mm = 2; mm < 16; mm++)
      for (int x = 0; x < mm; x++)
        for (int y = 0; y < mm; y++)
          for (int op = 0; op < 2; op++) begin
            a = 4'(x); b = 4'(y); m = 4'(mm); c0 = op[0];
            #1;
            checks++;
            if (int'(sum) != (op ? (x - y + mm) % mm : (x + y) % mm)) begin
              failures++;
              if (failures < 10) $display("FAIL %0d %s %0d mod %0d = %0d", x, op ? "-" : "+", y, mm, sum);
            end
          end
    a = 4'd4; b = 4'd2; m = 4'd13; c0 = 1'b1; #1;
    checks++;
    if (sum != 4'd2) begin failures++; $display("FAIL sample point"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
