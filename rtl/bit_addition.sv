// bit_addition -- first stage of the three-operand adder: bitwise addition.
//
// A row of N independent full adders reduces three N-bit operands to two
// words without any carry propagation: for every bit i
//   sp[i] = a[i] ^ b[i] ^ c[i]            (bitwise sum)
//   cy[i] = majority(a[i], b[i], c[i])    (bitwise carry, weight 2^(i+1))
// so that a + b + c = sp + 2*cy. Purely combinational, one full-adder delay.
// Each bit is a full_adder cell (two half adders and an OR gate). The stage
// is named in the published design; using the published full adder cell
// for it is this design's choice.
module bit_addition #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  output logic [N-1:0] sp,
  output logic [N-1:0] cy
);
  for (genvar i = 0; i < N; i++) begin : g_fa
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .s(sp[i]), .cout(cy[i]));
  end
endmodule
