// ced_block0 -- least significant block of the error-detecting carry-select adder.
//
// A plain ripple-carry adder of NK bits built from HA' (ha_dup) and INC'
// (inc_dup) cells, with no carry input: bit 0 is a half adder only, bits
// 1..NK-1 add the half-adder result to the carry from the bit below. Every
// carry exists twice. The unprimed chain c[] forms the sum bits and cout;
// the primed copies cp[] (each produced from the duplicate half-adder carry
// of its own bit) give the duplicate carry out coutp and the block's carry
// parity pc = cp[1] ^ ... ^ cp[NK-1], the parity of the carries entering
// bits 1..NK-1. Purely combinational; the critical path is NK cells.
// The structure follows the published block_0; NK (block width) is this
// design's choice and must be at least 2.
module ced_block0 #(
  parameter int unsigned NK = 4
) (
  input  logic [NK-1:0] x,
  input  logic [NK-1:0] y,
  output logic [NK-1:0] s,
  output logic          cout,
  output logic          coutp,
  output logic          pc
);
  if (NK < 2) begin : g_bad_nk
    $error("ced_block0: NK must be at least 2");
  end

  logic [NK-1:0] t1, t1p, t0;
  logic [NK:1]   c, cp;   // c[j]: carry into bit j (c[NK] = carry out)

  for (genvar j = 0; j < NK; j++) begin : g_ha
    ha_dup u_ha (.x(x[j]), .y(y[j]), .t1(t1[j]), .t1p(t1p[j]), .t0(t0[j]));
  end

  assign s[0]  = t0[0];
  assign c[1]  = t1[0];
  assign cp[1] = t1p[0];

  for (genvar j = 1; j < NK; j++) begin : g_inc
    inc_dup u_inc (.t1(t1[j]), .t1p(t1p[j]), .t0(t0[j]), .cin(c[j]),
                   .s(s[j]), .cout(c[j+1]), .coutp(cp[j+1]));
  end

  assign cout  = c[NK];
  assign coutp = cp[NK];
  assign pc    = ^cp[NK-1:1];
endmodule
