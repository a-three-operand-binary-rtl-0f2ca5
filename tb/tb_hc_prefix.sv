// tb_hc_prefix -- self-check of the Han-Carlson prefix tree.
// Widths 33 (default), 8 and 5. Legal (g, p) pairs (never both 1) are drawn
// from random addends; the expected group generates come from a bit-serial
// carry recurrence G[i:0] = g[i] | p[i] & G[i-1:0]. The 8-bit tree is also
// checked for every pair of 8-bit addends.
module tb_hc_prefix;
  int checks = 0, failures = 0;

  logic [32:0] g33, p33, gg33;
  logic [7:0]  g8, p8, gg8;
  logic [4:0]  g5, p5, gg5;

  hc_prefix          dut33 (.g(g33), .p(p33), .gg(gg33));
  hc_prefix #(.W(8)) dut8  (.g(g8),  .p(p8),  .gg(gg8));
  hc_prefix #(.W(5)) dut5  (.g(g5),  .p(p5),  .gg(gg5));

  function automatic logic [32:0] serial(input logic [32:0] g, input logic [32:0] p, input int w);
    logic [32:0] r = '0;
    logic acc = 1'b0;
    for (int i = 0; i < w; i++) begin
      acc  = g[i] | (p[i] & acc);
      r[i] = acc;
    end
    return r;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      logic [32:0] xa, ya;
      xa = {$urandom, $urandom};
      ya = {$urandom, $urandom};
      if (n % 4 == 0) ya = ~xa ^ 33'(1 << ($urandom % 33));  // long propagate runs
      g33 = xa & ya; p33 = xa ^ ya;
      g5 = g33[4:0]; p5 = p33[4:0];
      #1;
      checks++;
      if (gg33 != serial(g33, p33, 33)) begin
        failures++;
        $display("FAIL33 g=%h p=%h -> gg=%h", g33, p33, gg33);
      end
      checks++;
      if (gg5 != serial({28'b0, g5}, {28'b0, p5}, 5)) begin
        failures++;
        $display("FAIL5 g=%b p=%b -> gg=%b", g5, p5, gg5);
      end
    end
    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) begin
        g8 = 8'(a & b); p8 = 8'(a ^ b);
        #1;
        checks++;
        if (gg8 != serial({25'b0, g8}, {25'b0, p8}, 8)) begin
          failures++;
          $display("FAIL8 g=%b p=%b -> gg=%b", g8, p8, gg8);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
