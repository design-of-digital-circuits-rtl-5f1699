// Datapath of the GCD processor, built from reversible gates.
// Two WIDTH-bit registers A and B (reversible D flip-flops). Per bit:
//   - input multiplexers (Fredkin): A_in = SA ? X : D,  B_in = SB ? Y : D,
//     where D is the subtractor output;
//   - load enables (Fredkin):       A_next = LA ? A_in : A, likewise for B;
//   - operand multiplexers (Fredkin): minuend = SMinuend ? B : A,
//     subtrahend = SSubtrahend ? A : B.
// The subtractor is a TSG ripple adder computing minuend + ~subtrahend + 1
// (Feynman gates with B = 1 invert). The comparator is a second TSG ripple
// adder computing A + ~B + 1: its carry out is A >= B, and a chain of Fredkin
// OR gates over its sum gives A != B. GT, EQ and LT follow from those two.
// Every multi-use signal is duplicated by Feynman gates, and each control
// input is passed along its row of Fredkin gates through their P outputs, so
// no net drives more than one gate.
// Interface: clk; X, Y; LA, LB, SA, SB, SMinuend, SSubtrahend from the
// control unit -> Z (the value of register A), LT, GT, EQ (A compared with B).
// Registers load on the rising edge of clk; GT/EQ/LT settle combinationally.
// The ports and signal names follow the source design; everything inside
// (the use of the adder for subtraction and comparison, the multiplexer
// polarities, Z = A) is this design's choice.
// The registers are latch pairs (rev_dff), so tools report latches and
// combinational loops from each register through the subtractor and
// multiplexers back to it; the loops are cut by the master and slave latches
// never being open at the same time.
module gcd_datapath #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] X,
  input  logic [WIDTH-1:0] Y,
  input  logic             LA,
  input  logic             LB,
  input  logic             SA,
  input  logic             SB,
  input  logic             SMinuend,
  input  logic             SSubtrahend,
  output logic [WIDTH-1:0] Z,
  output logic             LT,
  output logic             GT,
  output logic             EQ
);
  logic [WIDTH-1:0] ra, rb;                      // register outputs
  logic [WIDTH-1:0] ra_hold, ra_min, ra_sub, ra_cmp, ra_z;
  logic [WIDTH-1:0] rb_hold, rb_min, rb_sub, rb_cmp;
  logic [WIDTH-1:0] diff, diff_a, diff_b;        // subtractor result and copies
  logic [WIDTH-1:0] a_in, b_in, a_nxt, b_nxt;
  logic [WIDTH-1:0] minuend, subtrahend, subtrahend_n, rb_cmp_n, cmp_sum;
  // Control signals travelling along each row of Fredkin gates.
  logic [WIDTH:0]   sa_row, sb_row, la_row, lb_row, smin_row, ssub_row;
  // Garbage outputs.
  logic [WIDTH-1:0] g_sa, g_sb, g_la, g_lb, g_smin, g_ssub, g_inv0, g_inv1, g_or_p, g_or_r;
  logic             g_sub_cout;

  assign sa_row[0]   = SA;
  assign sb_row[0]   = SB;
  assign la_row[0]   = LA;
  assign lb_row[0]   = LB;
  assign smin_row[0] = SMinuend;
  assign ssub_row[0] = SSubtrahend;

  // Comparator zero-detect chain: any_diff[i+1] = cmp_sum[i] | any_diff[i].
  logic [WIDTH:0] any_diff;
  assign any_diff[0] = 1'b0;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    // Registers.
    rev_dff u_ra (.clk(clk), .d(a_nxt[i]), .q(ra[i]));
    rev_dff u_rb (.clk(clk), .d(b_nxt[i]), .q(rb[i]));

    // Regeneration of register and subtractor outputs.
    rev_fanout #(.N(5)) u_fa (.x(ra[i]),   .y({ra_z[i], ra_cmp[i], ra_sub[i], ra_min[i], ra_hold[i]}));
    rev_fanout #(.N(4)) u_fb (.x(rb[i]),   .y({rb_cmp[i], rb_sub[i], rb_min[i], rb_hold[i]}));
    rev_fanout #(.N(2)) u_fd (.x(diff[i]), .y({diff_b[i], diff_a[i]}));

    // Input multiplexers and load enables.
    logic gr0, gr1, gr2, gr3, gr4, gr5;
    rev_fredkin u_amux (.a(sa_row[i]), .b(diff_a[i]),  .c(X[i]),    .p(sa_row[i+1]), .q(a_in[i]),  .r(gr0));
    rev_fredkin u_bmux (.a(sb_row[i]), .b(diff_b[i]),  .c(Y[i]),    .p(sb_row[i+1]), .q(b_in[i]),  .r(gr1));
    rev_fredkin u_ald  (.a(la_row[i]), .b(ra_hold[i]), .c(a_in[i]), .p(la_row[i+1]), .q(a_nxt[i]), .r(gr2));
    rev_fredkin u_bld  (.a(lb_row[i]), .b(rb_hold[i]), .c(b_in[i]), .p(lb_row[i+1]), .q(b_nxt[i]), .r(gr3));

    // Operand multiplexers.
    rev_fredkin u_mmux (.a(smin_row[i]), .b(ra_min[i]), .c(rb_min[i]), .p(smin_row[i+1]), .q(minuend[i]),    .r(gr4));
    rev_fredkin u_smux (.a(ssub_row[i]), .b(rb_sub[i]), .c(ra_sub[i]), .p(ssub_row[i+1]), .q(subtrahend[i]), .r(gr5));

    // Inverters for the two's-complement subtractions.
    rev_feynman u_inv0 (.a(subtrahend[i]), .b(1'b1), .p(g_inv0[i]), .q(subtrahend_n[i]));
    rev_feynman u_inv1 (.a(rb_cmp[i]),     .b(1'b1), .p(g_inv1[i]), .q(rb_cmp_n[i]));

    // Zero detect over the comparator difference (Fredkin OR: Q = x ? 1 : y).
    rev_fredkin u_or (.a(cmp_sum[i]), .b(any_diff[i]), .c(1'b1), .p(g_or_p[i]), .q(any_diff[i+1]), .r(g_or_r[i]));

    assign g_sa[i]   = gr0;
    assign g_sb[i]   = gr1;
    assign g_la[i]   = gr2;
    assign g_lb[i]   = gr3;
    assign g_smin[i] = gr4;
    assign g_ssub[i] = gr5;
  end

  // Subtractor: diff = minuend - subtrahend.
  rev_ripple_adder #(.WIDTH(WIDTH)) u_sub (
    .a(minuend), .b(subtrahend_n), .cin(1'b1), .sum(diff), .cout(g_sub_cout)
  );

  // Comparator: A - B; carry out = (A >= B).
  logic a_ge_b, a_ge_b_0, a_ge_b_1;
  rev_ripple_adder #(.WIDTH(WIDTH)) u_cmp (
    .a(ra_cmp), .b(rb_cmp_n), .cin(1'b1), .sum(cmp_sum), .cout(a_ge_b)
  );
  rev_fanout #(.N(2)) u_fge (.x(a_ge_b), .y({a_ge_b_1, a_ge_b_0}));

  // EQ = ~any_diff; GT = (A >= B) & any_diff; LT = ~(A >= B).
  logic ne_0, ne_1, g_e0, g_g0, g_g1, g_l0;
  rev_fanout  #(.N(2)) u_fne (.x(any_diff[WIDTH]), .y({ne_1, ne_0}));
  rev_feynman u_eq (.a(ne_0), .b(1'b1), .p(g_e0), .q(EQ));
  rev_fredkin u_gt (.a(a_ge_b_0), .b(1'b0), .c(ne_1), .p(g_g0), .q(GT), .r(g_g1));
  rev_feynman u_lt (.a(a_ge_b_1), .b(1'b1), .p(g_l0), .q(LT));

  assign Z = ra_z;
endmodule
