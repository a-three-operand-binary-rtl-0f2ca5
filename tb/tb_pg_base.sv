// tb_pg_base -- self-check of the base generate/propagate stage at N = 4.
// Exhaustive over sp and cy: g and p must be the bitwise AND and XOR of the
// two addends {0, sp} and {cy, 0}, and the addends recovered from g and p
// (x + y = p + 2*g per bit position) must sum to sp + 2*cy.
module tb_pg_base;
  localparam int N = 4;
  logic [N-1:0] sp, cy;
  logic [N:0] g, p;
  int checks = 0, failures = 0;

  pg_base #(.N(N)) dut (.sp(sp), .cy(cy), .g(g), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << (2 * N)); i++) begin
      bit ok;
      int total;
      {sp, cy} = (2*N)'(i);
      #1;
      ok = 1;
      total = 0;
      for (int j = 0; j <= N; j++) begin
        int xb, yb;
        xb = (j < N) ? int'(sp[j]) : 0;
        yb = (j > 0) ? int'(cy[j-1]) : 0;
        if (g[j] != 1'(xb & yb) || p[j] != 1'(xb ^ yb)) ok = 0;
        total += (int'(p[j]) + 2 * int'(g[j])) << j;
      end
      if (total != int'(sp) + 2 * int'(cy)) ok = 0;
      checks++;
      if (!ok) begin
        failures++;
        $display("FAIL sp=%b cy=%b -> g=%b p=%b", sp, cy, g, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
