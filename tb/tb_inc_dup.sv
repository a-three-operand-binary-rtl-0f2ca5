// tb_inc_dup -- exhaustive self-check of the duplicated-carry incrementer.
// For every legal half-adder result {t1, t0} (never both 1), every carry in
// and both values of the duplicate carry t1p, checks {cout, s} against the
// integer sum 2*t1 + t0 + cin, and coutp against the same sum formed with t1p.
module tb_inc_dup;
  logic t1, t1p, t0, cin, s, cout, coutp;
  int checks = 0, failures = 0;

  inc_dup dut (.t1(t1), .t1p(t1p), .t0(t0), .cin(cin), .s(s), .cout(cout), .coutp(coutp));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      {t1, t1p, t0, cin} = 4'(i);
      if (t1 & t0) continue;
      if (t1p & t0) continue;
      #1;
      checks++;
      if ({cout, s} != 2'(2 * int'(t1) + int'(t0) + int'(cin))) begin
        failures++;
        $display("FAIL t1=%b t0=%b cin=%b -> cout=%b s=%b", t1, t0, cin, cout, s);
      end
      checks++;
      if (coutp != 1'((2 * int'(t1p) + int'(t0) + int'(cin)) >> 1)) begin
        failures++;
        $display("FAIL t1p=%b t0=%b cin=%b -> coutp=%b", t1p, t0, cin, coutp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
