// csa_adder -- 8-bit adder built from reversible full adder / subtractor cells.
//
// add = a + b + cin, a 9-bit result (add[8] is the carry out). W fafs cells
// are chained as a ripple-carry adder: cell i adds a[i], b[i] and the carry
// of cell i-1 (cin for cell 0); its sd output is add[i]. The cells' borrow
// outputs are not needed for addition and are left unconnected.
// Purely combinational; the delay is W cells. The module name, the a(7:0),
// b(7:0), cin and add(8:0) ports and the fafs cell are the published ones;
// the ripple chaining of the cells is this design's choice.
module csa_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W:0]   add
);
  logic [W:0] c;
  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_cell
    fafs u_fafs (.a(a[i]), .b(b[i]), .c(c[i]),
                 .sd(add[i]), .carry(c[i+1]), .borrow());
  end

  assign add[W] = c[W];
endmodule
