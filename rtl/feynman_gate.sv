// Feynman (controlled-NOT) gate, the 2x2 reversible gate.
//
// Mapping: P = A, Q = A xor B. It is a bijection on two bits, so no
// information is lost. With B tied to 0 both outputs equal A, which is how
// reversible logic copies a signal (plain fan-out is not allowed): the design
// uses it that way for operand fan-out and for the accumulator output buffer.
// Purely combinational; the equations are the standard ones for this gate.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
