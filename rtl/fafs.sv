// fafs -- reversible full adder / full subtractor cell.
//
// From three Feynman gates and one Fredkin gate it computes, for bits a, b
// and c (carry or borrow in):
//   sd     = a ^ b ^ c                     sum, and also difference a - b - c
//   carry  = (a == b) ? a : c              carry of a + b + c
//   borrow = (a == b) ? c : b              borrow of a - b - c
// Wiring: GATE1 (b, a, 0) gives a^b and a copy of b; GATE2 (c, 0, 0) fans
// out c; GATE3 (a^b, c, 0) gives sd and a copy of a^b; GATE4, the Fredkin
// gate, uses a^b as its control with c and b as the data lines, so it passes
// c or b through to borrow (q) and carry (r). Unused gate lines are tied to 0.
// Purely combinational. The gate names GATE1..GATE4 and their kinds are the
// published ones; the wiring is read from the published schematic, and the
// constant-0 inputs are this design's choice.
module fafs (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sd,
  output logic carry,
  output logic borrow
);
  logic g1p, g1q, g1r, g2p, g2q, g2r, g3p, g3q, g3r, g4p;

  feynman GATE1 (.a(b),   .b(a),   .c(1'b0), .p(g1p), .q(g1q), .r(g1r));
  feynman GATE2 (.a(c),   .b(1'b0), .c(1'b0), .p(g2p), .q(g2q), .r(g2r));
  feynman GATE3 (.a(g1q), .b(g2p), .c(1'b0), .p(g3p), .q(g3q), .r(g3r));
  fredkin GATE4 (.a(g3r), .b(g2q), .c(g1r), .p(g4p), .q(borrow), .r(carry));

  assign sd = g3q;
endmodule
