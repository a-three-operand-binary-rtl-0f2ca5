// ced_csa -- concurrent-error-detectable multi-block carry-select adder.
//
// Adds two N-bit words, S = X + Y, with carry out cn, and predicts the parity
// of S so that a checker can detect a fault while the adder runs. X and Y
// arrive with their parity bits px and py (parity-coded data). The word is cut
// into N/NK blocks of NK bits: block 0 (ced_block0) is a ripple adder, every
// higher block (ced_blockk) computes its results for both possible carries in
// advance and selects them when the carry from the block below arrives. All
// carries travel on two separate wires (cin/cinp), ending in cn and cnp.
// Because s[i] = x[i] ^ y[i] ^ c[i], the sum parity is predicted as
//   ps = px ^ py ^ pC_0 ^ pC_1 ^ ... ^ pC_{NB-1}
// where pC_k is the parity of the carries into the bits of block k, computed
// from the duplicate carries. A fault shows as parity(S) != ps or cn != cnp
// (see ced_checker). A wrong px or py shows the same way.
// Purely combinational; delay is about NK cells for block 0 plus one MUX' per
// higher block. Structure and parity equation follow the published design;
// uniform block width NK is this design's choice (the published scheme allows
// blocks of different widths). N defaults to the published 32-bit adder.
module ced_csa #(
  parameter int unsigned N  = 32,
  parameter int unsigned NK = 4
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic         px,
  input  logic         py,
  output logic [N-1:0] s,
  output logic         cn,
  output logic         cnp,
  output logic         ps
);
  localparam int unsigned NB = N / NK;

  if (N % NK != 0 || NB < 1) begin : g_bad_n
    $error("ced_csa: N must be a multiple of NK");
  end

  logic [NB:1]   cin, cinp;   // cin[k]: carry into block k (cin[NB] = cn)
  logic [NB-1:0] pc;

  ced_block0 #(.NK(NK)) u_blk0 (
    .x(x[NK-1:0]), .y(y[NK-1:0]), .s(s[NK-1:0]),
    .cout(cin[1]), .coutp(cinp[1]), .pc(pc[0])
  );

  for (genvar k = 1; k < NB; k++) begin : g_blk
    ced_blockk #(.NK(NK)) u_blk (
      .x(x[k*NK +: NK]), .y(y[k*NK +: NK]),
      .cin(cin[k]), .cinp(cinp[k]),
      .s(s[k*NK +: NK]),
      .cout(cin[k+1]), .coutp(cinp[k+1]), .pc(pc[k])
    );
  end

  assign cn  = cin[NB];
  assign cnp = cinp[NB];
  assign ps  = px ^ py ^ (^pc);
endmodule
