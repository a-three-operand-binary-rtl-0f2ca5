// adder_top -- three adder designs side by side.
//
//  * ced_csa + ced_checker: a 32-bit carry-select adder whose carries are
//    duplicated and whose sum parity is predicted, so that a single stuck-at
//    fault inside it is flagged on ced_err while it runs.
//  * hc3a: a three-operand adder, A + B + C, with bitwise carry-save
//    reduction followed by a Han-Carlson parallel-prefix carry tree.
//  * csa_adder: an 8-bit ripple adder of reversible full adder/subtractor
//    cells (Feynman and Fredkin gates).
// The three share nothing; each brings its own ports out. All combinational.
// Parameter defaults are the published sizes (32-bit adders, 8-bit
// csa_adder); the carry-select block width CED_NK = 4 is this design's choice.
module adder_top #(
  parameter int unsigned CED_N  = 32,
  parameter int unsigned CED_NK = 4,
  parameter int unsigned T3_N   = 32
) (
  // error-detecting carry-select adder
  input  logic [CED_N-1:0] ced_x,
  input  logic [CED_N-1:0] ced_y,
  input  logic             ced_px,
  input  logic             ced_py,
  output logic [CED_N-1:0] ced_s,
  output logic             ced_cn,
  output logic             ced_cnp,
  output logic             ced_ps,
  output logic             ced_err,
  // three-operand adder
  input  logic [T3_N-1:0]  t3_a,
  input  logic [T3_N-1:0]  t3_b,
  input  logic [T3_N-1:0]  t3_c,
  output logic [T3_N+1:0]  t3_sum,
  // reversible-cell adder
  input  logic [7:0]       r_a,
  input  logic [7:0]       r_b,
  input  logic             r_cin,
  output logic [8:0]       r_add
);
  ced_csa #(.N(CED_N), .NK(CED_NK)) u_ced (
    .x(ced_x), .y(ced_y), .px(ced_px), .py(ced_py),
    .s(ced_s), .cn(ced_cn), .cnp(ced_cnp), .ps(ced_ps)
  );

  ced_checker #(.N(CED_N)) u_chk (
    .s(ced_s), .ps(ced_ps), .cn(ced_cn), .cnp(ced_cnp), .err(ced_err)
  );

  hc3a #(.N(T3_N)) u_t3 (.a(t3_a), .b(t3_b), .c(t3_c), .sum(t3_sum));

  csa_adder #(.W(8)) u_rev (.a(r_a), .b(r_b), .cin(r_cin), .add(r_add));
endmodule
