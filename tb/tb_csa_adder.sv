// tb_csa_adder -- exhaustive self-check of the 8-bit reversible-cell adder:
// every a, b and cin (131072 cases), add must equal a + b + cin.
module tb_csa_adder;
  logic [7:0] a, b;
  logic cin;
  logic [8:0] add;
  int checks = 0, failures = 0;

  csa_adder dut (.a(a), .b(b), .cin(cin), .add(add));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << 17); i++) begin
      {a, b, cin} = 17'(i);
      #1;
      checks++;
      if (add != 9'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        if (failures < 10) $display("FAIL %0d+%0d+%0d -> %0d", a, b, cin, add);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
