// Control unit of the GCD processor: a two-bit binary-encoded state machine
// made of reversible parts. Two reversible master-slave D flip-flops (rev_dff)
// hold the state {s1,s0}; the regeneration module (gcd_regen) duplicates the
// inputs and state bits with Feynman gates; the output module (gcd_output)
// computes the control signals and the next state with Fredkin gates.
// States: IDLE (00) waits for GO; GO loads X and Y into the datapath and
// enters RUN (01); in RUN each clock either subtracts the smaller register
// from the larger (GT: A <= A-B, else B <= B-A) or, on EQ, goes to FIN (10),
// where DONE = 1 until GO starts a new computation.
// Interface: clk, RESETn (active low, sampled on the rising edge), GO, GT, EQ
// from the datapath -> LA, LB, SA, SB, SMinuend, SSubtrahend, DONE. Outputs
// are a function of the state and the present inputs (Mealy), and state
// changes on the rising edge of clk.
// The port names, the two flip-flops with binary encoding and the
// flip-flop / regeneration / output partition follow the source design; the
// state table and the reset behaviour are this design's own.
module gcd_control (
  input  logic clk,
  input  logic RESETn,
  input  logic GO,
  input  logic GT,
  input  logic EQ,
  output logic LA,
  output logic LB,
  output logic SA,
  output logic SB,
  output logic SMinuend,
  output logic SSubtrahend,
  output logic DONE
);
  logic       s0, s1, ns0, ns1;
  logic [3:0] go_c;
  logic [1:0] gt_c;
  logic [2:0] eq_c;
  logic [6:0] s0_c;
  logic [5:0] s1_c;

  rev_dff u_ff0 (.clk(clk), .d(ns0), .q(s0));
  rev_dff u_ff1 (.clk(clk), .d(ns1), .q(s1));

  gcd_regen u_regen (
    .go(GO), .gt(GT), .eq(EQ), .s0(s0), .s1(s1),
    .go_c(go_c), .gt_c(gt_c), .eq_c(eq_c), .s0_c(s0_c), .s1_c(s1_c)
  );

  gcd_output u_output (
    .resetn(RESETn), .go_c(go_c), .gt_c(gt_c), .eq_c(eq_c), .s0_c(s0_c), .s1_c(s1_c),
    .ns0(ns0), .ns1(ns1), .la(LA), .lb(LB), .sa(SA), .sb(SB),
    .smin(SMinuend), .ssub(SSubtrahend), .done(DONE)
  );
endmodule
