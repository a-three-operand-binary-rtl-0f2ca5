// tb_ced_csa -- self-check of the error-detecting carry-select adder.
// Three instances: the default 32-bit adder of 4-bit blocks, a 12-bit adder
// of 3-bit blocks and an 8-bit adder of 2-bit blocks. Random and corner
// operands with correct parity bits: {cn, s} must equal x + y, cnp must equal
// cn and ps must equal the parity of s. Operands with a flipped parity bit:
// ps must then differ from the parity of s (the input error is caught).
// Finally single stuck-at faults are forced onto carries between blocks of
// the 32-bit adder (both copies, one at a time): every wrong result must come
// with parity(s) != ps or cn != cnp, and a fault on a duplicate carry must
// never corrupt the sum.
module tb_ced_csa;
  int checks = 0, failures = 0;

  logic [31:0] x32, y32, s32;
  logic        px32, py32, cn32, cnp32, ps32;
  logic [11:0] x12, y12, s12;
  logic        px12, py12, cn12, cnp12, ps12;
  logic [7:0]  x8, y8, s8;
  logic        px8, py8, cn8, cnp8, ps8;

  ced_csa dut32 (.x(x32), .y(y32), .px(px32), .py(py32), .s(s32), .cn(cn32), .cnp(cnp32), .ps(ps32));
  ced_csa #(.N(12), .NK(3)) dut12 (.x(x12), .y(y12), .px(px12), .py(py12), .s(s12), .cn(cn12), .cnp(cnp12), .ps(ps12));
  ced_csa #(.N(8), .NK(2)) dut8 (.x(x8), .y(y8), .px(px8), .py(py8), .s(s8), .cn(cn8), .cnp(cnp8), .ps(ps8));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check32(input logic [31:0] a, input logic [31:0] b, input logic flip);
    logic [32:0] ref_sum;
    x32 = a; y32 = b; px32 = (^a) ^ flip; py32 = ^b;
    #1;
    ref_sum = {1'b0, a} + {1'b0, b};
    checks++;
    if ({cn32, s32} != ref_sum || cnp32 != cn32 || ((ps32 != ^s32) != flip)) begin
      failures++;
      $display("FAIL32 x=%h y=%h flip=%b -> s=%h cn=%b cnp=%b ps=%b", a, b, flip, s32, cn32, cnp32, ps32);
    end
  endtask

  initial begin
    logic [31:0] corner [6] = '{32'h0, 32'hFFFF_FFFF, 32'h0000_0001, 32'h8000_0000, 32'h5555_5555, 32'hAAAA_AAAA};
    foreach (corner[i]) foreach (corner[j]) check32(corner[i], corner[j], 1'b0);
    for (int n = 0; n < 5000; n++) check32($urandom, $urandom, 1'b0);
    // long carry propagation: x + (~x + 1)-style pairs
    for (int n = 0; n < 500; n++) begin
      logic [31:0] r;
      r = $urandom;
      check32(r, ~r, 1'b0);
      check32(r, (~r) + 32'd1, 1'b0);
    end
    for (int n = 0; n < 500; n++) check32($urandom, $urandom, 1'b1);

    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) begin
        x8 = 8'(a); y8 = 8'(b); px8 = ^x8; py8 = ^y8;
        #1;
        checks++;
        if ({cn8, s8} != 9'(a + b) || cnp8 != cn8 || ps8 != ^s8) begin
          failures++;
          $display("FAIL8 x=%0d y=%0d -> s=%0d cn=%b cnp=%b ps=%b", a, b, s8, cn8, cnp8, ps8);
        end
      end
    end

    for (int n = 0; n < 5000; n++) begin
      x12 = 12'($urandom); y12 = 12'($urandom); px12 = ^x12; py12 = ^y12;
      #1;
      checks++;
      if ({cn12, s12} != 13'(int'(x12) + int'(y12)) || cnp12 != cn12 || ps12 != ^s12) begin
        failures++;
        $display("FAIL12 x=%h y=%h -> s=%h cn=%b", x12, y12, s12, cn12);
      end
    end

    force dut32.cin[3] = 1'b0;   fault_run(0); release dut32.cin[3];
    force dut32.cin[5] = 1'b1;   fault_run(0); release dut32.cin[5];
    force dut32.cin[1] = 1'b1;   fault_run(0); release dut32.cin[1];
    force dut32.cinp[4] = 1'b1;  fault_run(1); release dut32.cinp[4];
    force dut32.cinp[2] = 1'b0;  fault_run(1); release dut32.cinp[2];

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // dup: the forced net is a duplicate carry, which must leave s and cn intact
  task automatic fault_run(input bit dup);
    int caught = 0;
    for (int n = 0; n < 2000; n++) begin
      logic [32:0] r;
      bit flagged;
      x32 = $urandom; y32 = $urandom; px32 = ^x32; py32 = ^y32;
      #1;
      r = {1'b0, x32} + {1'b0, y32};
      flagged = (ps32 != ^s32) || (cn32 != cnp32);
      checks++;
      if (dup ? ({cn32, s32} != r) : ({cn32, s32} != r && !flagged)) begin
        failures++;
        $display("FAIL fault run dup=%b x=%h y=%h -> s=%h cn=%b", dup, x32, y32, s32, cn32);
      end
      if (flagged) caught++;
    end
    checks++;
    if (caught == 0) begin
      failures++;
      $display("FAIL fault never flagged");
    end
  endtask
endmodule
