// full_adder -- one-bit full adder from two half adders and an OR gate.
//
// The first half adder adds a and b; the second adds its sum to cin and
// gives s = a ^ b ^ cin. The two half-adder carries never are 1 together,
// so an OR gate joins them into cout = a&b | (a^b)&cin (the majority of
// the three inputs). Purely combinational, three gate delays on the carry.
// The two-half-adders-plus-OR structure is the published one.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  logic s1, c1, c2;

  half_adder u_ha1 (.a(a),  .b(b),   .s(s1), .c(c1));
  half_adder u_ha2 (.a(s1), .b(cin), .s(s),  .c(c2));

  assign cout = c1 | c2;
endmodule
