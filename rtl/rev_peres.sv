// Peres reversible gate, 3 inputs / 3 outputs: P = A, Q = A xor B,
// R = (A and B) xor C. With C = 0 it is a half adder (Q = sum, R = carry),
// which is how the multiplier uses it. Purely combinational.
// Function as given by the source design.
module rev_peres (
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
