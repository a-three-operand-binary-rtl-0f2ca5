// tb_feynman -- exhaustive self-check of the feynman reversible gate: all eight
// inputs, expected p = a, q = a ^ b, r = a ^ c. Also checks that the map is a
// permutation of the eight input patterns (the gate is reversible).
module tb_feynman;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  bit [7:0] seen = '0;

  feynman dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      logic [2:0] e;
      {a, b, c} = 3'(i);
      #1;
      e = {a, a ^ b, a ^ c};
      seen[{p, q, r}] = 1'b1;
      checks++;
      if ({p, q, r} != e) begin
        failures++;
        $display("FAIL abc=%b%b%b -> pqr=%b%b%b", a, b, c, p, q, r);
      end
    end
    checks++;
    if (seen != 8'hFF) begin
      failures++;
      $display("FAIL not reversible: outputs seen %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
