// Reversible D latch, transparent while en = 1.
// A Fredkin gate with A = en, B = stored state and C = d gives
// Q = en ? d : state, the next state of the latch; the storage element holds
// that value while en is high and keeps it while en is low. A Feynman gate
// (B = 0) copies the stored state so that one copy feeds back into the
// Fredkin gate and the other drives the output.
// Interface: en, d -> q. Level sensitive: q follows d while en = 1.
// The Fredkin + Feynman composition follows the source design; the exact
// wiring is this design's own. The storage is written as a latch, so lint and
// synthesis report one latch per instance, and a combinational path from the
// stored state through the Fredkin gate back to the latch input (the gate's
// feedback, which only matters while en = 1, when the gate passes d instead):
// both are the intended circuit.
module rev_dlatch (
  input  logic en,
  input  logic d,
  output logic q
);
  logic state;     // stored bit
  logic state_fb;  // copy fed back into the Fredkin gate
  logic nxt;       // Fredkin output Q: en ? d : state
  logic en_p, fr;  // garbage outputs

  rev_fredkin u_fredkin (
    .a (en), .b (state_fb), .c (d),
    .p (en_p), .q (nxt), .r (fr)
  );

  always_latch begin
    if (en) state <= nxt;
  end

  rev_feynman u_copy (.a(state), .b(1'b0), .p(state_fb), .q(q));
endmodule
