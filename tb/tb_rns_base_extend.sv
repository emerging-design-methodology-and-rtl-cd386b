// tb_rns_base_extend: for every X in 0..29 given as residues over (2, 3, 5),
// checks the extension to modulus 7 (default instance) and to modulus 11
// against X mod 7 and X mod 11; includes X = 16 -> 2 (mod 7) and 5 (mod 11).
module tb_rns_base_extend;
  logic [2:0][2:0] x;
  logic [2:0] e7;
  logic [3:0] e11;
  int checks = 0, failures = 0;
  rns_base_extend dut (.x(x), .x_ext(e7));
  rns_base_extend #(.NMOD(3), .M('{2, 3, 5}), .MEXT(11), .RW(3)) u11 (.x(x), .x_ext(e11));
  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 30; v++) begin
      x[0] = 3'(v % 2); x[1] = 3'(v % 3); x[2] = 3'(v % 5);
      #1;
      checks += 2;
      if (int'(e7) != v % 7)   begin failures++; $display("FAIL %0d mod 7 -> %0d", v, e7); end
      if (int'(e11) != v % 11) begin failures++; $display("FAIL %0d mod 11 -> %0d", v, e11); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
