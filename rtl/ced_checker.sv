// ced_checker -- error check for the carry-select adder ced_csa.
//
// Raises err when the actual parity of the sum differs from the predicted
// parity ps, or when the two copies of the carry out disagree:
//   err = (^s != ps) | (cn != cnp)
// Purely combinational. Both comparisons are the ones the published scheme
// names; gathering them into one flag is this design's choice.
module ced_checker #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] s,
  input  logic         ps,
  input  logic         cn,
  input  logic         cnp,
  output logic         err
);
  assign err = ((^s) ^ ps) | (cn ^ cnp);
endmodule
