// Reversible GCD processor: computes the greatest common divisor of two
// WIDTH-bit unsigned numbers by Euclid's subtraction method. After GO, X and Y
// are loaded into registers A and B; then on every clock the smaller register
// is subtracted from the larger one (A <= A-B if A > B, B <= B-A if A < B)
// until A = B, which is the result. Z always shows register A; DONE is 1
// once A = B has been reached and stays 1 until the next GO.
// Interface: clk, RESETn (active low, synchronous), GO (sampled on the
// rising edge in the idle or finished state), X, Y -> Z, DONE.
// Timing: one cycle to load, one cycle per subtraction, one cycle to see
// A = B; DONE is valid from the following edge.
// Both operands must be non-zero: with a zero operand A = B is never reached.
// The control unit / datapath split and all port names follow the source
// design.
module rev_gcd #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             RESETn,
  input  logic             GO,
  input  logic [WIDTH-1:0] X,
  input  logic [WIDTH-1:0] Y,
  output logic [WIDTH-1:0] Z,
  output logic             DONE
);
  logic la, lb, sa, sb, smin, ssub, gt, eq, lt;

  gcd_control u_control (
    .clk(clk), .RESETn(RESETn), .GO(GO), .GT(gt), .EQ(eq),
    .LA(la), .LB(lb), .SA(sa), .SB(sb), .SMinuend(smin), .SSubtrahend(ssub),
    .DONE(DONE)
  );

  gcd_datapath #(.WIDTH(WIDTH)) u_datapath (
    .clk(clk), .X(X), .Y(Y), .LA(la), .LB(lb), .SA(sa), .SB(sb),
    .SMinuend(smin), .SSubtrahend(ssub), .Z(Z), .LT(lt), .GT(gt), .EQ(eq)
  );
endmodule
