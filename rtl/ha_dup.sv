// ha_dup -- half adder with a duplicated carry (the HA' cell).
//
// Adds two bits x and y. The sum bit t0 = x ^ y; the carry t1 = x & y is
// produced twice, by two separate AND gates, as t1 and t1p. One copy feeds
// the carry chain that forms the sum, the other feeds the chain from which
// the carry parity is predicted, so a single stuck-at fault in one AND gate
// cannot corrupt both the sum and the predicted parity.
// Purely combinational. The two-AND-plus-XOR structure follows the
// published gate-level cell; the port names are this design's own.
module ha_dup (
  input  logic x,
  input  logic y,
  output logic t1,   // carry
  output logic t1p,  // duplicate carry
  output logic t0    // sum
);
  assign t1  = x & y;
  assign t1p = x & y;
  assign t0  = x ^ y;
endmodule
