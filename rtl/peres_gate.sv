// Peres gate, a 3x3 reversible gate.
//
// Mapping: P = A, Q = A xor B, R = (A and B) xor C. With C tied to 0 the R
// output is A and B, which is how the partial-product generator forms each
// x_i.y_j; the same setting makes the gate a half adder (Q = sum, R = carry),
// used in the multiplier's adder array and at bit 0 of the accumulator.
// Purely combinational; the equations are the standard ones for this gate.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule
