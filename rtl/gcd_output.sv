// Output module of the GCD control unit: computes the datapath control
// signals, DONE and the next state from the regenerated inputs, using Fredkin
// gates as multiplexers (Q = A ? C : B) and as AND gates (B = 0), and Feynman
// gates with B = 1 as inverters.
//
// State encoding {s1,s0}: IDLE = 00, RUN = 01, FIN = 10 (11 is unused).
//   IDLE : wait for GO. GO loads X and Y (SA = SB = 1, LA = LB = 1), -> RUN.
//   RUN  : EQ       -> FIN, nothing loaded.
//          GT       -> A <= A - B  (LA = 1, SA = 0, SMinuend = SSubtrahend = 0).
//          else (LT)-> B <= B - A  (LB = 1, SB = 0, SMinuend = SSubtrahend = 1).
//   FIN  : DONE = 1; GO reloads X and Y and starts again, as from IDLE.
//   11   : -> IDLE.
// resetn = 0 forces the next state to IDLE (synchronous reset).
// Equations (each line one or more gates below):
//   ns0  = resetn & (s0 ? ~s1&~EQ : GO)
//   ns1  = resetn & (s0 ? ~s1&EQ  : s1&~GO)
//   LA   = s0 ? ~s1&GT : GO        LB = s0 ? ~s1&~GT&~EQ : GO
//   SMinuend = SSubtrahend = s0&~s1&~GT&~EQ
//   SA = SB = ~s0                  DONE = s1&~s0
// Interface: copies from gcd_regen and resetn -> ns0, ns1, la, lb, sa, sb,
// smin, ssub, done. Combinational.
// Using Fredkin gates for this logic follows the source design; the state
// table, the encoding and the reset are this design's own.
module gcd_output (
  input  logic       resetn,
  input  logic [3:0] go_c,
  input  logic [1:0] gt_c,
  input  logic [2:0] eq_c,
  input  logic [6:0] s0_c,
  input  logic [5:0] s1_c,
  output logic       ns0,
  output logic       ns1,
  output logic       la,
  output logic       lb,
  output logic       sa,
  output logic       sb,
  output logic       smin,
  output logic       ssub,
  output logic       done
);
  // Garbage outputs of the gates below are collected here and left unused.
  logic [17:0] gp;
  logic [10:0] gr;

  // Inverted copies (Feynman, B = 1).
  logic n_s1_0, n_s1_2, n_s1_3, n_s1_4, n_eq_0, n_eq_2, n_go_1, n_gt_1, n_s0_5, n_s0_6;
  rev_feynman u_i0 (.a(s1_c[0]), .b(1'b1), .p(gp[0]), .q(n_s1_0));
  rev_feynman u_i1 (.a(s1_c[2]), .b(1'b1), .p(gp[1]), .q(n_s1_2));
  rev_feynman u_i2 (.a(s1_c[3]), .b(1'b1), .p(gp[2]), .q(n_s1_3));
  rev_feynman u_i3 (.a(s1_c[4]), .b(1'b1), .p(gp[3]), .q(n_s1_4));
  rev_feynman u_i4 (.a(eq_c[0]), .b(1'b1), .p(gp[4]), .q(n_eq_0));
  rev_feynman u_i5 (.a(eq_c[2]), .b(1'b1), .p(gp[5]), .q(n_eq_2));
  rev_feynman u_i6 (.a(go_c[1]), .b(1'b1), .p(gp[6]), .q(n_go_1));
  rev_feynman u_i7 (.a(gt_c[1]), .b(1'b1), .p(gp[7]), .q(n_gt_1));
  rev_feynman u_i8 (.a(s0_c[5]), .b(1'b1), .p(gp[8]), .q(n_s0_5));
  rev_feynman u_i9 (.a(s0_c[6]), .b(1'b1), .p(gp[9]), .q(n_s0_6));

  // ns0 = resetn & (s0 ? ~s1&~EQ : GO)
  logic t_run_ne, m_ns0, rst_pass;
  rev_fredkin u_f0 (.a(n_s1_0),  .b(1'b0),    .c(n_eq_0),   .p(gp[10]),   .q(t_run_ne), .r(gr[0]));
  rev_fredkin u_f1 (.a(s0_c[0]), .b(go_c[0]), .c(t_run_ne), .p(gp[11]),   .q(m_ns0),    .r(gr[1]));
  rev_fredkin u_f2 (.a(resetn),  .b(1'b0),    .c(m_ns0),    .p(rst_pass), .q(ns0),      .r(gr[2]));

  // ns1 = resetn & (s0 ? ~s1&EQ : s1&~GO); resetn arrives through u_f2's P.
  logic t_fin_hold, t_run_eq, m_ns1;
  rev_fredkin u_f3 (.a(s1_c[1]),  .b(1'b0),       .c(n_go_1),   .p(gp[12]), .q(t_fin_hold), .r(gr[3]));
  rev_fredkin u_f4 (.a(n_s1_2),   .b(1'b0),       .c(eq_c[1]),  .p(gp[13]), .q(t_run_eq),   .r(gr[4]));
  rev_fredkin u_f5 (.a(s0_c[1]),  .b(t_fin_hold), .c(t_run_eq), .p(gp[14]), .q(m_ns1),      .r(gr[5]));
  rev_fredkin u_f6 (.a(rst_pass), .b(1'b0),       .c(m_ns1),    .p(gp[15]), .q(ns1),        .r(gr[6]));

  // LA = s0 ? ~s1&GT : GO
  logic t_run_gt;
  rev_fredkin u_f7 (.a(n_s1_3),  .b(1'b0),    .c(gt_c[0]),  .p(gp[16]), .q(t_run_gt), .r(gr[7]));
  rev_fredkin u_f8 (.a(s0_c[2]), .b(go_c[2]), .c(t_run_gt), .p(gp[17]), .q(la),       .r(gr[8]));

  // LB = s0 ? ~s1&~GT&~EQ : GO ; SMinuend = SSubtrahend = s0 & ~s1&~GT&~EQ
  logic t_lt, t_run_lt, t_run_lt_a, t_run_lt_b, t_sel;
  logic [5:0] gx;  // garbage outputs of the gates in this group
  rev_fredkin u_f9  (.a(n_gt_1),  .b(1'b0),    .c(n_eq_2),     .p(gx[0]), .q(t_lt),     .r(gr[9]));
  rev_fredkin u_f10 (.a(n_s1_4),  .b(1'b0),    .c(t_lt),       .p(gx[1]), .q(t_run_lt), .r(gr[10]));
  rev_feynman u_c0  (.a(t_run_lt), .b(1'b0), .p(t_run_lt_a), .q(t_run_lt_b));
  rev_fredkin u_f11 (.a(s0_c[3]), .b(go_c[3]), .c(t_run_lt_a), .p(gx[2]), .q(lb),       .r(gx[4]));
  rev_fredkin u_f12 (.a(s0_c[4]), .b(1'b0),    .c(t_run_lt_b), .p(gx[3]), .q(t_sel),    .r(gx[5]));
  rev_feynman u_c1  (.a(t_sel), .b(1'b0), .p(smin), .q(ssub));

  // SA = SB = ~s0
  rev_feynman u_c2 (.a(n_s0_5), .b(1'b0), .p(sa), .q(sb));

  // DONE = s1 & ~s0
  logic gd_p, gd_r;
  rev_fredkin u_f13 (.a(s1_c[5]), .b(1'b0), .c(n_s0_6), .p(gd_p), .q(done), .r(gd_r));
endmodule
