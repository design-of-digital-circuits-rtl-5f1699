// Regeneration module of the GCD control unit. Reversible logic lets every
// signal drive only one gate, so each control-unit input and state bit that
// the output module uses more than once is duplicated here by a chain of
// Feynman gates (see rev_fanout). The copy counts are exactly the number of
// gates that read each signal in gcd_output.
// Interface: go, gt, eq, s0, s1 -> go_c[3:0], gt_c[1:0], eq_c[2:0],
// s0_c[6:0], s1_c[5:0]. Combinational.
// Duplicating by Feynman gates follows the source design; the counts follow
// from this design's output logic.
module gcd_regen (
  input  logic       go,
  input  logic       gt,
  input  logic       eq,
  input  logic       s0,
  input  logic       s1,
  output logic [3:0] go_c,
  output logic [1:0] gt_c,
  output logic [2:0] eq_c,
  output logic [6:0] s0_c,
  output logic [5:0] s1_c
);
  rev_fanout #(.N(4)) u_go (.x(go), .y(go_c));
  rev_fanout #(.N(2)) u_gt (.x(gt), .y(gt_c));
  rev_fanout #(.N(3)) u_eq (.x(eq), .y(eq_c));
  rev_fanout #(.N(7)) u_s0 (.x(s0), .y(s0_c));
  rev_fanout #(.N(6)) u_s1 (.x(s1), .y(s1_c));
endmodule
