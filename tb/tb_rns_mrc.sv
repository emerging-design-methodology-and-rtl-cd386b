// tb_rns_mrc: checks the Diophantine mixed-radix digits over (5, 7, 11) for
// every X in 0..384: each digit must be below its modulus and
// a11 + a22*5 + a33*35 must give X back. Includes X = 300 -> (0, 4, 8).
// A second instance over (2, 3, 5) is checked the same way for X in 0..29.
module tb_rns_mrc;
  logic [2:0][3:0] x, dig;
  logic [2:0][2:0] y, dg;
  int checks = 0, failures = 0;
  rns_mrc dut (.x(x), .dig(dig));
  rns_mrc #(.NMOD(3), .M('{2, 3, 5}), .RW(3)) u235 (.x(y), .dig(dg));
  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 385; v++) begin
      x[0] = 4'(v % 5); x[1] = 4'(v % 7); x[2] = 4'(v % 11);
      y[0] = 3'((v % 30) % 2); y[1] = 3'((v % 30) % 3); y[2] = 3'((v % 30) % 5);
      #1;
      checks += 2;
      if (dig[0] >= 5 || dig[1] >= 7 || dig[2] >= 11 ||
          int'(dig[0]) + int'(dig[1]) * 5 + int'(dig[2]) * 35 != v) begin
        failures++; $display("FAIL X=%0d digits %0d %0d %0d", v, dig[0], dig[1], dig[2]);
      end
      if (int'(dg[0]) + int'(dg[1]) * 2 + int'(dg[2]) * 6 != v % 30) begin
        failures++; $display("FAIL (2,3,5) X=%0d", v % 30);
      end
      if (v == 300) begin
        checks++;
        if (dig[0] != 0 || dig[1] != 4 || dig[2] != 8) begin failures++; $display("FAIL 300"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
