// Top level holding the three reversible-logic circuits of this design side
// by side. They share no signals; each keeps its own ports:
//   - a 4-bit ripple-carry adder of TSG gates (add_*), combinational;
//   - an 8 x 8 unsigned Wallace tree multiplier of Toffoli, Peres and TSG
//     gates (mul_*), combinational;
//   - a 16-bit GCD processor whose control unit and datapath are made of
//     Feynman and Fredkin gates and reversible master-slave flip-flops
//     (clk, RESETn, GO, X, Y, Z, DONE), sequential, rising-edge clocked.
// The sizes are the source design's and are parameters.
module rev_circuits_top #(
  parameter int unsigned ADD_WIDTH = 4,
  parameter int unsigned MUL_WIDTH = 8,
  parameter int unsigned GCD_WIDTH = 16
) (
  input  logic [ADD_WIDTH-1:0]   add_a,
  input  logic [ADD_WIDTH-1:0]   add_b,
  input  logic                   add_cin,
  output logic [ADD_WIDTH-1:0]   add_sum,
  output logic                   add_cout,
  input  logic [MUL_WIDTH-1:0]   mul_a,
  input  logic [MUL_WIDTH-1:0]   mul_b,
  output logic [2*MUL_WIDTH-1:0] mul_p,
  input  logic                   clk,
  input  logic                   RESETn,
  input  logic                   GO,
  input  logic [GCD_WIDTH-1:0]   X,
  input  logic [GCD_WIDTH-1:0]   Y,
  output logic [GCD_WIDTH-1:0]   Z,
  output logic                   DONE
);
  rev_ripple_adder #(.WIDTH(ADD_WIDTH)) u_adder (
    .a(add_a), .b(add_b), .cin(add_cin), .sum(add_sum), .cout(add_cout)
  );

  rev_wallace_mult #(.WIDTH(MUL_WIDTH)) u_mult (
    .a(mul_a), .b(mul_b), .p(mul_p)
  );

  rev_gcd #(.WIDTH(GCD_WIDTH)) u_gcd (
    .clk(clk), .RESETn(RESETn), .GO(GO), .X(X), .Y(Y), .Z(Z), .DONE(DONE)
  );
endmodule
