// ced_blockk -- upper block (k >= 1) of the error-detecting carry-select adder.
//
// The block's NK bit pairs first pass a row of HA' cells (ha_dup). Two rows of
// INC' cells (inc_dup) then ripple the block twice: row 0 assumes a carry in
// of 0, row 1 a carry in of 1. In row 0 bit 0 needs no gate (its carry is the
// half-adder carry); in row 1 bit 0 its carry is t1 ^ t0. Each row yields sum
// candidates for bits 1..NK-1, a carry out, a duplicate carry out and a carry
// parity pR = (primed carries into bits 1..NK-1, XORed).
// A row of MUX' cells (mux_x) picks the results once the carries arrive:
//   s[0]   = t0[0] ^ cin
//   s[j]   = cin  ? s1[j]   : s0[j]     (j >= 1)
//   cout   = cin  ? c1[NK]  : c0[NK]
//   coutp  = cin  ? c1p[NK] : c0p[NK]
//   pc     = (cin ? p1 : p0) ^ cinp     -- parity of all carries of the block
// The row parity is chosen by cin, like the sum, but the carry-in term of the
// parity comes from the duplicate cinp. If cin is wrong, the sum holds the
// other row and s[0] = t0[0] ^ cin flips, while pc sees the other row's
// parity with the correct carry-in term: parity(S) and the prediction then
// always differ by one. If cinp is wrong, pc alone is off by one. Both carry
// outs are steered by cin, so a wrong cin reaches the next block on both
// wires and adds no second (cancelling) parity mismatch there; cinp is only
// the carry-in term of the parity. A fault in the last cout multiplexer is
// seen as cn != cnp.
// Purely combinational: the delay from cin to the outputs is one MUX'.
// The cell rows and the parity multiplexer followed by an XOR with a carry
// input follow the published block_k; which of cin/cinp drives each
// multiplexer is this design's reading of the published description. NK must be at least 2.
module ced_blockk #(
  parameter int unsigned NK = 4
) (
  input  logic [NK-1:0] x,
  input  logic [NK-1:0] y,
  input  logic          cin,
  input  logic          cinp,
  output logic [NK-1:0] s,
  output logic          cout,
  output logic          coutp,
  output logic          pc
);
  if (NK < 2) begin : g_bad_nk
    $error("ced_blockk: NK must be at least 2");
  end

  logic [NK-1:0] t1, t1p, t0;
  // cR[j] / cRp[j]: carry into bit j of row R (R = assumed carry in)
  logic [NK:1]   c0, c0p, c1, c1p;
  logic [NK-1:1] s0, s1;
  logic          p0, p1, psel;

  for (genvar j = 0; j < NK; j++) begin : g_ha
    ha_dup u_ha (.x(x[j]), .y(y[j]), .t1(t1[j]), .t1p(t1p[j]), .t0(t0[j]));
  end

  // bit 0 of both rows: the incrementer with a constant carry in reduces to wires / one XOR
  assign c0[1]  = t1[0];
  assign c0p[1] = t1p[0];
  assign c1[1]  = t1[0]  ^ t0[0];
  assign c1p[1] = t1p[0] ^ t0[0];

  for (genvar j = 1; j < NK; j++) begin : g_inc
    inc_dup u_inc0 (.t1(t1[j]), .t1p(t1p[j]), .t0(t0[j]), .cin(c0[j]),
                    .s(s0[j]), .cout(c0[j+1]), .coutp(c0p[j+1]));
    inc_dup u_inc1 (.t1(t1[j]), .t1p(t1p[j]), .t0(t0[j]), .cin(c1[j]),
                    .s(s1[j]), .cout(c1[j+1]), .coutp(c1p[j+1]));
  end

  assign p0 = ^c0p[NK-1:1];
  assign p1 = ^c1p[NK-1:1];

  assign s[0] = t0[0] ^ cin;
  for (genvar j = 1; j < NK; j++) begin : g_mux
    mux_x u_mux (.i1(s1[j]), .i0(s0[j]), .sel(cin), .o(s[j]));
  end
  mux_x u_mux_cout  (.i1(c1[NK]),  .i0(c0[NK]),  .sel(cin),  .o(cout));
  mux_x u_mux_coutp (.i1(c1p[NK]), .i0(c0p[NK]), .sel(cin),  .o(coutp));
  mux_x u_mux_pc    (.i1(p1),      .i0(p0),      .sel(cin),  .o(psel));
  assign pc = psel ^ cinp;
endmodule
