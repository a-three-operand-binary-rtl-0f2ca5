// inc_dup -- incrementer with a duplicated carry out (the INC' cell).
//
// Adds a carry bit cin to the two-bit half-adder result {t1, t0} and returns
// the two-bit result {cout, s}: s = t0 ^ cin and cout = t1 | (t0 & cin).
// Because a half adder never sets t1 and t0 together, the OR is written as an
// XOR, which makes a stuck-at fault on either input visible at the output.
// The carry out is produced twice: cout from t1, coutp from the duplicate
// half-adder carry t1p. A ripple of ha_dup + inc_dup cells forms a full
// adder row. Purely combinational. The XOR-based carry and the single shared
// carry input follow the published gate-level cell.
module inc_dup (
  input  logic t1,    // half-adder carry
  input  logic t1p,   // duplicate half-adder carry
  input  logic t0,    // half-adder sum
  input  logic cin,   // incoming carry
  output logic s,
  output logic cout,
  output logic coutp
);
  assign s     = t0 ^ cin;
  assign cout  = t1  ^ (t0 & cin);
  assign coutp = t1p ^ (t0 & cin);
endmodule
