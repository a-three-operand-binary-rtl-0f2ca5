// tb_ced_block0 -- exhaustive self-check of the least significant block.
// Every operand pair of a 4-bit block: the sum and carry out must equal
// x + y, the duplicate carry must equal the carry, and pc must be the parity
// of the carries into bits 1..3, each carry found from the integer sum of
// the operand bits below it.
module tb_ced_block0;
  localparam int NK = 4;
  logic [NK-1:0] x, y, s;
  logic cout, coutp, pc;
  int checks = 0, failures = 0;

  ced_block0 #(.NK(NK)) dut (.x(x), .y(y), .s(s), .cout(cout), .coutp(coutp), .pc(pc));

  function automatic logic carry_into(int xi, int yi, int bit_pos);
    int m = (1 << bit_pos) - 1;
    return 1'(((xi & m) + (yi & m)) >> bit_pos);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < (1 << NK); a++) begin
      for (int b = 0; b < (1 << NK); b++) begin
        logic exp_pc;
        x = NK'(a);
        y = NK'(b);
        #1;
        exp_pc = 1'b0;
        for (int j = 1; j < NK; j++) exp_pc ^= carry_into(a, b, j);
        checks++;
        if ({cout, s} != (NK+1)'(a + b) || coutp != cout || pc != exp_pc) begin
          failures++;
          $display("FAIL x=%0d y=%0d -> s=%0d cout=%b coutp=%b pc=%b (pc exp %b)",
                   a, b, s, cout, coutp, pc, exp_pc);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
