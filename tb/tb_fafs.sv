// tb_fafs -- exhaustive self-check of the reversible full adder / subtractor:
// for all eight inputs, {carry, sd} must equal a + b + c and {borrow, sd}
// must be the two's-complement result of a - b - c.
module tb_fafs;
  logic a, b, c, sd, carry, borrow;
  int checks = 0, failures = 0;

  fafs dut (.a(a), .b(b), .c(c), .sd(sd), .carry(carry), .borrow(borrow));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      int diff;
      {a, b, c} = 3'(i);
      #1;
      diff = int'(a) - int'(b) - int'(c);
      checks++;
      if ({carry, sd} != 2'(int'(a) + int'(b) + int'(c))) begin
        failures++;
        $display("FAIL add a=%b b=%b c=%b -> carry=%b sd=%b", a, b, c, carry, sd);
      end
      checks++;
      if (sd != 1'(diff & 1) || borrow != (diff < 0)) begin
        failures++;
        $display("FAIL sub a=%b b=%b c=%b -> borrow=%b sd=%b", a, b, c, borrow, sd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
