// tb_ced_checker -- exhaustive self-check of the error checker at N = 8:
// every sum word with every ps, cn, cnp; err must be set exactly when the
// parity of s differs from ps or cn differs from cnp.
module tb_ced_checker;
  logic [7:0] s;
  logic ps, cn, cnp, err;
  int checks = 0, failures = 0;

  ced_checker #(.N(8)) dut (.s(s), .ps(ps), .cn(cn), .cnp(cnp), .err(err));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << 11); i++) begin
      int ones;
      logic exp_err;
      ones = 0;
      {s, ps, cn, cnp} = 11'(i);
      #1;
      for (int j = 0; j < 8; j++) ones += int'(s[j]);
      exp_err = ((ones % 2) != int'(ps)) || (cn != cnp);
      checks++;
      if (err != exp_err) begin
        failures++;
        $display("FAIL s=%b ps=%b cn=%b cnp=%b -> err=%b", s, ps, cn, cnp, err);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
