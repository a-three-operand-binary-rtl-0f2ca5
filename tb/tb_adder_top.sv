// tb_adder_top -- end-to-end self-check of adder_top at its default sizes.
//
// Error-detecting 32-bit carry-select adder: random and long-carry operand
// pairs with correct parity bits must give the right sum and carry with
// err = 0; operands with one flipped parity bit must raise err. Then single
// stuck-at faults are forced, one at a time, onto nets of the adder (three
// carries between blocks and one sum bit); under each fault every wrong result
// must come with err = 1. Fault sites are nets of the single ced_csa instance:
// a simulator may share the code of a repeated submodule between instances,
// and forcing a net inside one instance may then force it in all of them.
// Three-operand adder: random and corner triples against a + b + c.
// Reversible-cell adder: random a, b, cin against a + b + cin.
// Every mechanism is counted (block carry-in of 1 selecting the precomputed
// row, carry out, input parity error caught, internal fault caught, the
// three-operand result using its top bit, carry out of the 8-bit adder);
// one that never happened counts as a failure.
module tb_adder_top;
  int checks = 0, failures = 0;

  logic [31:0] ced_x, ced_y, ced_s;
  logic        ced_px, ced_py, ced_cn, ced_cnp, ced_ps, ced_err;
  logic [31:0] t3_a, t3_b, t3_c;
  logic [33:0] t3_sum;
  logic [7:0]  r_a, r_b;
  logic        r_cin;
  logic [8:0]  r_add;

  int n_row1_select = 0, n_ced_carry_out = 0, n_parity_err_caught = 0;
  int n_fault_caught = 0, n_t3_top_bit = 0, n_rev_carry_out = 0;

  adder_top dut (.*);

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one addition on the error-detecting adder; flip corrupts px
  task automatic ced_op(input logic [31:0] a, input logic [31:0] b, input logic flip,
                        input bit faulty);
    logic [32:0] r;
    ced_x = a; ced_y = b; ced_px = (^a) ^ flip; ced_py = ^b;
    #1;
    r = {1'b0, a} + {1'b0, b};
    checks++;
    if (faulty) begin
      if ({ced_cn, ced_s} != r) begin
        if (ced_err) n_fault_caught++;
        else begin
          failures++;
          $display("FAIL undetected fault: x=%h y=%h -> s=%h cn=%b", a, b, ced_s, ced_cn);
        end
      end
    end else if (flip) begin
      if (!ced_err || {ced_cn, ced_s} != r) begin
        failures++;
        $display("FAIL parity error not caught: x=%h y=%h", a, b);
      end else n_parity_err_caught++;
    end else begin
      if ({ced_cn, ced_s} != r || ced_err || ced_cnp != ced_cn) begin
        failures++;
        $display("FAIL ced x=%h y=%h -> s=%h cn=%b cnp=%b ps=%b err=%b",
                 a, b, ced_s, ced_cn, ced_cnp, ced_ps, ced_err);
      end
      for (int k = 1; k < 8; k++)
        if (((({1'b0, a} & ((33'd1 << (4*k)) - 1)) + ({1'b0, b} & ((33'd1 << (4*k)) - 1))) >> (4*k)) != 0) begin
          n_row1_select++;
          break;
        end
      if (r[32]) n_ced_carry_out++;
    end
  endtask

  task automatic fault_run(input int which);
    int f0 = failures;
    for (int n = 0; n < 3000; n++) begin
      logic [31:0] a;
      a = $urandom;
      ced_op(a, (n % 2 == 0) ? $urandom : ~a ^ (32'd1 << ($urandom % 32)), 1'b0, 1'b1);
    end
    $display("fault %0d: %0d wrong results caught so far, %0d missed", which, n_fault_caught,
             failures - f0);
  endtask

  initial begin
    // --- error-detecting carry-select adder, fault free
    for (int n = 0; n < 20000; n++) begin
      logic [31:0] a, b;
      a = $urandom;
      b = (n % 3 == 0) ? ~a + 32'(n % 2) : $urandom;
      ced_op(a, b, 1'b0, 1'b0);
    end
    for (int n = 0; n < 1000; n++) ced_op($urandom, $urandom, 1'b1, 1'b0);

    // --- single stuck-at faults inside the adder
    force dut.u_ced.cin[3] = 1'b0;
    fault_run(1);
    release dut.u_ced.cin[3];
    force dut.u_ced.cin[1] = 1'b1;
    fault_run(2);
    release dut.u_ced.cin[1];
    force dut.u_ced.cin[7] = 1'b0;
    fault_run(3);
    release dut.u_ced.cin[7];
    force dut.u_ced.s[13] = 1'b1;
    fault_run(4);
    release dut.u_ced.s[13];
    ced_op(32'h1234_5678, 32'h0FED_CBA9, 1'b0, 1'b0);  // fault-free again

    // --- three-operand adder
    for (int n = 0; n < 20000; n++) begin
      logic [33:0] r;
      if (n == 0) begin t3_a = '1; t3_b = '1; t3_c = '1; end
      else begin t3_a = $urandom; t3_b = $urandom; t3_c = $urandom; end
      #1;
      r = {2'b0, t3_a} + {2'b0, t3_b} + {2'b0, t3_c};
      checks++;
      if (t3_sum != r) begin
        failures++;
        $display("FAIL t3 %h+%h+%h -> %h", t3_a, t3_b, t3_c, t3_sum);
      end
      if (r[33]) n_t3_top_bit++;
    end

    // --- reversible-cell adder
    for (int n = 0; n < 20000; n++) begin
      {r_a, r_b, r_cin} = 17'($urandom);
      #1;
      checks++;
      if (r_add != 9'(int'(r_a) + int'(r_b) + int'(r_cin))) begin
        failures++;
        $display("FAIL rev %0d+%0d+%0d -> %0d", r_a, r_b, r_cin, r_add);
      end
      if (r_add[8]) n_rev_carry_out++;
    end

    $display("mechanisms: row1_select=%0d ced_carry_out=%0d parity_err_caught=%0d fault_caught=%0d t3_top_bit=%0d rev_carry_out=%0d",
             n_row1_select, n_ced_carry_out, n_parity_err_caught, n_fault_caught, n_t3_top_bit, n_rev_carry_out);
    if (n_row1_select == 0)       failures++;
    if (n_ced_carry_out == 0)     failures++;
    if (n_parity_err_caught == 0) failures++;
    if (n_fault_caught == 0)      failures++;
    if (n_t3_top_bit == 0)        failures++;
    if (n_rev_carry_out == 0)     failures++;
    checks += 6;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
