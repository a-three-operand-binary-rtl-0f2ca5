// tb_hc3a -- self-check of the three-operand adder.
// Exhaustive at N = 4 (all triples); random and corner triples at the default
// N = 32 and at N = 64 and N = 128. The reference is a + b + c formed with
// plain wide integer addition.
module tb_hc3a;
  int checks = 0, failures = 0;

  logic [3:0]   a4, b4, c4;
  logic [5:0]   s4;
  logic [31:0]  a32, b32, c32;
  logic [33:0]  s32;
  logic [63:0]  a64, b64, c64;
  logic [65:0]  s64;
  logic [127:0] a128, b128, c128;
  logic [129:0] s128;

  hc3a #(.N(4))   dut4   (.a(a4),   .b(b4),   .c(c4),   .sum(s4));
  hc3a            dut32  (.a(a32),  .b(b32),  .c(c32),  .sum(s32));
  hc3a #(.N(64))  dut64  (.a(a64),  .b(b64),  .c(c64),  .sum(s64));
  hc3a #(.N(128)) dut128 (.a(a128), .b(b128), .c(c128), .sum(s128));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [127:0] rnd128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    for (int i = 0; i < 4096; i++) begin
      {a4, b4, c4} = 12'(i);
      #1;
      checks++;
      if (s4 != 6'(int'(a4) + int'(b4) + int'(c4))) begin
        failures++;
        $display("FAIL4 %0d+%0d+%0d -> %0d", a4, b4, c4, s4);
      end
    end
    for (int n = 0; n < 3000; n++) begin
      logic [129:0] r;
      case (n)
        0: begin a128 = '1; b128 = '1; c128 = '1; end
        1: begin a128 = '0; b128 = '0; c128 = '0; end
        2: begin a128 = '1; b128 = 128'd1; c128 = '0; end
        default: begin a128 = rnd128(); b128 = rnd128(); c128 = rnd128(); end
      endcase
      a32 = a128[31:0]; b32 = b128[31:0]; c32 = c128[31:0];
      a64 = a128[63:0]; b64 = b128[63:0]; c64 = c128[63:0];
      #1;
      r = {2'b0, a128} + {2'b0, b128} + {2'b0, c128};
      checks++;
      if (s128 != r) begin
        failures++;
        $display("FAIL128 %h+%h+%h -> %h", a128, b128, c128, s128);
      end
      r = {66'b0, a64} + {66'b0, b64} + {66'b0, c64};
      checks++;
      if (s64 != r[65:0]) begin
        failures++;
        $display("FAIL64 %h+%h+%h -> %h", a64, b64, c64, s64);
      end
      r = {98'b0, a32} + {98'b0, b32} + {98'b0, c32};
      checks++;
      if (s32 != r[33:0]) begin
        failures++;
        $display("FAIL32 %h+%h+%h -> %h", a32, b32, c32, s32);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
