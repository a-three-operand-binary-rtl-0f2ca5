// tb_ha_dup -- exhaustive self-check of the duplicated-carry half adder.
// Applies all four input pairs and compares {t1, t0} and t1p with the
// integer sum x + y.
module tb_ha_dup;
  logic x, y, t1, t1p, t0;
  int checks = 0, failures = 0;

  ha_dup dut (.x(x), .y(y), .t1(t1), .t1p(t1p), .t0(t0));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {x, y} = 2'(i);
      #1;
      checks++;
      if ({t1, t0} != 2'(int'(x) + int'(y)) || t1p != t1) begin
        failures++;
        $display("FAIL x=%b y=%b -> t1=%b t1p=%b t0=%b", x, y, t1, t1p, t0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
