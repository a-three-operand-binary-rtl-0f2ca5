// fredkin -- Fredkin (controlled-swap) reversible gate.
//
// p = a; when a = 0, q = b and r = c; when a = 1 the two lines swap, q = c
// and r = b. In gate form q = ~a&b | a&c, r = ~a&c | a&b. Purely
// combinational. The gate name and a/b/c, p/q/r pins are the published ones;
// the equations are the standard definition.
module fredkin (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = (~a & b) | (a & c);
  assign r = (~a & c) | (a & b);
endmodule
