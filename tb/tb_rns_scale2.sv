// tb_rns_scale2: for every X in 0..28 given over the base (3, 5, 2), checks
// that the scaled result's residues are those of X/2 (X even) or (X+1)/2
// (X odd). Covers the worked values 8 -> 4, 6 -> 3 and 5 -> 3. X = 29 is the
// one value whose rounded half (15) is out of range and is not checked.
module tb_rns_scale2;
  logic [2:0][2:0] x, q;
  int checks = 0, failures = 0, n_odd = 0, n_even = 0;
  rns_scale2 dut (.x(x), .q(q));
  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int h;
    for (int v = 0; v < 29; v++) begin
      x[0]  = 3'(v % 3); x[1] = 3'(v % 5); x[2] = 3'(v % 2);
      #1;
      h = (v % 2 == 0) ? v / 2 : (v + 1) / 2;
      if (v % 2 == 1) n_odd++; else n_even++;
      checks++;
      if (int'(q[0]) != h % 3 || int'(q[1]) != h % 5 || int'(q[2]) != h % 2) begin
        failures++; $display("FAIL X=%0d -> (%0d,%0d,%0d)", v, q[0], q[1], q[2]);
      end
      if (v == 8 || v == 6 || v == 5) begin
        checks++;
        if (!(q[0] == 3'(h % 3) && q[1] == 3'(h % 5))) failures++;
      end
    end
    checks++;
    if (n_odd == 0 || n_even == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
