// hc3a -- fast three-operand binary adder with a Han-Carlson carry tree.
//
// Computes sum = a + b + c for three N-bit operands (N+2-bit result) in four
// stages, instead of a carry-save row followed by a ripple-carry adder:
//   1. bit_addition : sp = a^b^c, cy = majority(a,b,c)   (a+b+c = sp + 2*cy)
//   2. pg_base      : generate/propagate of sp + 2*cy over N+1 positions
//   3. hc_prefix    : Han-Carlson prefix tree, carries G[i:0]
//   4. sum logic    : sum[0] = p[0], sum[i] = p[i] ^ G[i-1:0], sum[N+1] = G[N:0]
// Delay grows as log2(N) rather than N. Purely combinational, no clock.
// The four-stage split, the Han-Carlson tree and the 32/64/128-bit sizes
// come from the published design; the stage-level logic inside each stage is
// this design's reading of those named stages.
module hc3a #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  output logic [N+1:0] sum
);
  logic [N-1:0] sp, cy;
  logic [N:0]   g, p, gg;

  bit_addition #(.N(N))   u_bit (.a(a), .b(b), .c(c), .sp(sp), .cy(cy));
  pg_base      #(.N(N))   u_pg  (.sp(sp), .cy(cy), .g(g), .p(p));
  hc_prefix    #(.W(N+1)) u_pfx (.g(g), .p(p), .gg(gg));

  assign sum[0]     = p[0];
  assign sum[N:1]   = p[N:1] ^ gg[N-1:0];
  assign sum[N+1]   = gg[N];
endmodule
