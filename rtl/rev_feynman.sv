// Feynman (controlled-NOT) reversible gate, 2 inputs / 2 outputs.
// P passes A through and Q = A xor B. With B tied to 0 the gate copies A onto
// Q (used for fan-out, since a reversible net may drive only one gate); with B
// tied to 1 it gives the complement of A. Purely combinational, no timing.
// The function is the standard Feynman gate as defined in the source design.
module rev_feynman (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
