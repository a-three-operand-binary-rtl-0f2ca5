// hc_prefix -- Han-Carlson parallel-prefix carry tree.
//
// From bit generate g[i] and propagate p[i] it forms every group generate
// gg[i] = G[i:0], i.e. the carry out of bit i of a two-operand addition with
// no carry in. The prefix operator is
//   (G, P) o (G', P') = (G | P & G', P & P').
// Han-Carlson structure, ceil(log2 W) + 1 levels:
//   level 1     : every odd position combines with its even neighbour below;
//   levels 2..L : odd positions only, Kogge-Stone style, at distances 2, 4, 8 ...
//                 (positions whose span already reaches bit 0 pass through);
//   last level  : every even position i >= 2 combines with odd position i-1.
// Purely combinational; delay log2(W)+1 operator cells, half the cells of a
// Kogge-Stone tree. The Han-Carlson choice is the published one; the levels
// are the textbook Han-Carlson arrangement.
module hc_prefix #(
  parameter int unsigned W = 33
) (
  input  logic [W-1:0] g,
  input  logic [W-1:0] p,
  output logic [W-1:0] gg
);
  localparam int unsigned L = (W > 1) ? $clog2(W) : 1;  // odd-position levels

  // level l holds (G, P) of every position after l prefix levels
  logic [W-1:0] lg [L+1];
  logic [W-1:0] lp [L+1];

  assign lg[0] = g;
  assign lp[0] = p;

  for (genvar l = 1; l <= L; l++) begin : g_lvl
    localparam int unsigned D = (l == 1) ? 1 : (1 << (l - 1));
    for (genvar i = 0; i < W; i++) begin : g_pos
      if ((i % 2 == 1) && (i >= D)) begin : g_op
        assign lg[l][i] = lg[l-1][i] | (lp[l-1][i] & lg[l-1][i-D]);
        assign lp[l][i] = lp[l-1][i] & lp[l-1][i-D];
      end else begin : g_pass
        assign lg[l][i] = lg[l-1][i];
        assign lp[l][i] = lp[l-1][i];
      end
    end
  end

  // final level: even positions take the finished group generate of i-1
  for (genvar i = 0; i < W; i++) begin : g_fin
    if ((i % 2 == 0) && (i >= 2)) begin : g_op
      assign gg[i] = lg[L][i] | (lp[L][i] & lg[L][i-1]);
    end else begin : g_pass
      assign gg[i] = lg[L][i];
    end
  end
endmodule
