// tb_mux_x -- exhaustive self-check of the XOR-output 2:1 multiplexer.
module tb_mux_x;
  logic i1, i0, sel, o;
  int checks = 0, failures = 0;

  mux_x dut (.i1(i1), .i0(i0), .sel(sel), .o(o));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {i1, i0, sel} = 3'(i);
      #1;
      checks++;
      if (o != (sel ? i1 : i0)) begin
        failures++;
        $display("FAIL i1=%b i0=%b sel=%b -> o=%b", i1, i0, sel, o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
