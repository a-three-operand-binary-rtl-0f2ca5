// half_adder -- one-bit half adder.
//
// Adds bits a and b: s = a ^ b (XOR gate), c = a & b (AND gate), so that
// a + b = 2*c + s. Purely combinational, one gate delay. The XOR/AND form
// is the published one.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
