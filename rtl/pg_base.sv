// pg_base -- second stage of the three-operand adder: base generate/propagate.
//
// Prepares the two-operand addition sp + 2*cy. Position i (0..N) adds sp[i]
// (0 at i = N) and cy[i-1] (0 at i = 0):
//   g[i] = sp[i] & cy[i-1]      p[i] = sp[i] ^ cy[i-1]
// so g[0] = 0, p[0] = sp[0], g[N] = 0 and p[N] = cy[N-1].
// Purely combinational, one gate delay. Named ("PG logic") in the published
// design; the exact bit alignment is this design's.
module pg_base #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] sp,
  input  logic [N-1:0] cy,
  output logic [N:0]   g,
  output logic [N:0]   p
);
  logic [N:0] xa, ya;
  assign xa = {1'b0, sp};
  assign ya = {cy, 1'b0};
  assign g  = xa & ya;
  assign p  = xa ^ ya;
endmodule
