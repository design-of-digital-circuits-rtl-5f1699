// Reversible rising-edge D flip-flop made of two reversible D latches in
// master-slave arrangement. The master is transparent while clk = 0 and the
// slave while clk = 1, so q takes the value d had just before the rising
// edge of clk. A Feynman gate with B = 1 makes the inverted clock for the
// master (its P output passes clk on to the slave).
// Interface: clk, d -> q. No reset: users reset through their next-state
// logic. The master-slave construction follows the source design; the rising
// edge is this design's choice. Lint and synthesis see two latches here, and
// a loop through them wherever q feeds back to d through logic: the two
// latches are never transparent together, so the loop is broken in time.
module rev_dff (
  input  logic clk,
  input  logic d,
  output logic q
);
  logic clk_s, clk_n, qm;

  rev_feynman u_clkinv (.a(clk), .b(1'b1), .p(clk_s), .q(clk_n));
  rev_dlatch  u_master (.en(clk_n), .d(d),  .q(qm));
  rev_dlatch  u_slave  (.en(clk_s), .d(qm), .q(q));
endmodule
