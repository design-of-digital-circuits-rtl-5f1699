// TSG reversible gate, 4 inputs / 4 outputs, used as a full adder.
//   P = A,  Q = A xor B,  R = A xor B xor D,  S = ((A xor B) and D) xor (A and B) xor C
// With C tied to 0, R is the sum of A, B and D and S is their carry, so one
// gate makes one full-adder cell; D is the carry input. The mapping is a
// bijection (A and B follow from P and Q, D from R, C from S).
// P, Q and R follow the source design; S is this design's reading of its
// carry output: the product term (A xor B)·D is an AND, which is what makes
// the gate "function like a full adder" as the design intends.
// Purely combinational.
module rev_tsg (
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
  assign p = a;
  assign q = axb;
  assign r = axb ^ d;
  assign s = (axb & d) ^ (a & b) ^ c;
endmodule
