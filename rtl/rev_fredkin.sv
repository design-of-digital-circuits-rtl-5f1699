// Fredkin (controlled-swap) reversible gate, 3 inputs / 3 outputs.
// The control A passes through on P. When A = 0, Q = B and R = C; when A = 1
// the two data bits are swapped (Q = C, R = B). Hence Q = A'B + AC and
// R = AB + A'C. With constant inputs it serves as a 2:1 multiplexer
// (Q = A ? C : B), an AND gate (B = 0: Q = A & C) or an OR gate (C = 1).
// Purely combinational. Function as given by the source design. Inside the
// D latch (rev_dlatch) Q is stored and fed back to B, which tools report as a
// combinational loop through this gate; the latch breaks it.
module rev_fredkin (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = (~a & b) | (a & c);
  assign r = (a & b) | (~a & c);
endmodule
