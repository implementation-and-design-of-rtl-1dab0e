// HNG gate, a 4x4 reversible gate that works on its own as a full adder.
//
// Mapping: P = A, Q = B, R = A xor B xor C, S = ((A xor B) and C) xor (A and B)
// xor D. With D tied to 0, R is the sum and S the carry of A + B + C, and P, Q
// are garbage outputs (they only exist to keep the mapping reversible). The
// multiplier's adder array and bits 1..7 of the accumulator are built from it.
// Purely combinational; the equations are the standard ones for this gate.
module hng_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  logic axb;
  assign axb = a ^ b;
  assign p   = a;
  assign q   = b;
  assign r   = axb ^ c;
  assign s   = (axb & c) ^ (a & b) ^ d;
endmodule
