// feynman -- three-line Feynman (double Feynman) reversible gate.
//
// p = a, q = a ^ b, r = a ^ c. Line a is the control and passes through;
// it is XORed into lines b and c. Reversible: applying the gate twice gives
// back the inputs. Purely combinational. The gate name and its a/b/c, p/q/r
// pins are the published ones; the equations are the standard definition.
module feynman (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = a ^ c;
endmodule
