// Toffoli (controlled-controlled-NOT) reversible gate, 3 inputs / 3 outputs:
// P = A, Q = B, R = (A and B) xor C. With C = 0, R is the AND of A and B;
// the multiplier forms its partial products this way. Purely combinational.
// Function as given by the source design.
module rev_toffoli (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = b;
  assign r = (a & b) ^ c;
endmodule
