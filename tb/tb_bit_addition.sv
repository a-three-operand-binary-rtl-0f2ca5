// tb_bit_addition -- self-check of the bitwise-addition row.
// Exhaustive at N = 4 (all 4096 triples): for every bit, {cy, sp} must equal
// the count of ones among a, b, c; and sp + 2*cy must equal a + b + c.
module tb_bit_addition;
  localparam int N = 4;
  logic [N-1:0] a, b, c, sp, cy;
  int checks = 0, failures = 0;

  bit_addition #(.N(N)) dut (.a(a), .b(b), .c(c), .sp(sp), .cy(cy));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << (3 * N)); i++) begin
      bit ok;
      {a, b, c} = (3*N)'(i);
      #1;
      ok = 1;
      for (int j = 0; j < N; j++)
        if ({cy[j], sp[j]} != 2'(int'(a[j]) + int'(b[j]) + int'(c[j]))) ok = 0;
      if (int'(sp) + 2 * int'(cy) != int'(a) + int'(b) + int'(c)) ok = 0;
      checks++;
      if (!ok) begin
        failures++;
        $display("FAIL a=%b b=%b c=%b -> sp=%b cy=%b", a, b, c, sp, cy);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
