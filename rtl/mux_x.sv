// mux_x -- 2:1 multiplexer with an XOR output gate (the MUX' cell).
//
// o = sel ? i1 : i0, formed as (i1 & sel) ^ (i0 & ~sel). The two AND terms
// are never both 1, so the XOR gives the same function as the usual OR while
// letting every single stuck-at fault propagate to the output. Purely
// combinational. Structure after the published gate-level cell.
module mux_x (
  input  logic i1,
  input  logic i0,
  input  logic sel,
  output logic o
);
  assign o = (i1 & sel) ^ (i0 & ~sel);
endmodule
