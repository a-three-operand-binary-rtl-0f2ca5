// tb_ced_blockk -- exhaustive self-check of an upper carry-select block.
// Every operand pair of a 4-bit block with both carries in (cin = cinp):
// {cout, s} must equal x + y + cin, coutp must equal cout, and pc must be
// the parity of the carries into bits 0..3 (the carry into bit 0 is cin).
// With the duplicate carry in disagreeing (cinp = ~cin) the sum and both
// carry outs must not change and pc must be inverted.
module tb_ced_blockk;
  localparam int NK = 4;
  logic [NK-1:0] x, y, s;
  logic cin, cinp, cout, coutp, pc;
  int checks = 0, failures = 0;

  ced_blockk #(.NK(NK)) dut (.x(x), .y(y), .cin(cin), .cinp(cinp), .s(s),
                             .cout(cout), .coutp(coutp), .pc(pc));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ci = 0; ci < 4; ci++) begin
      for (int a = 0; a < (1 << NK); a++) begin
        for (int b = 0; b < (1 << NK); b++) begin
          logic exp_pc;
          x = NK'(a);
          y = NK'(b);
          cin = ci[0];
          cinp = ci[0] ^ ci[1];
          #1;
          exp_pc = cinp;
          for (int j = 1; j < NK; j++) begin
            int m;
            m = (1 << j) - 1;
            exp_pc ^= 1'(((a & m) + (b & m) + int'(cin)) >> j);
          end
          checks++;
          if ({cout, s} != (NK+1)'(a + b + int'(cin)) || coutp != cout || pc != exp_pc) begin
            failures++;
            $display("FAIL x=%0d y=%0d cin=%0d -> s=%0d cout=%b coutp=%b pc=%b (pc exp %b)",
                     a, b, ci, s, cout, coutp, pc, exp_pc);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
