// Reversible ripple-carry adder built from a chain of TSG gates.
// Stage i is one TSG gate with A = a[i], B = b[i], C = 0 and D = the carry
// from stage i-1 (cin for stage 0); its R output is sum[i] and its S output is
// the carry into stage i+1. The last carry is cout. The P and Q outputs of
// every gate are garbage outputs and are left unused.
// Interface: a, b (WIDTH bits), cin -> sum (WIDTH bits), cout. Combinational,
// the result settles after WIDTH gate delays.
// The gate chain, the constant-0 C inputs and the 4-bit default follow the
// source design; WIDTH is a parameter so the GCD datapath can reuse the adder
// at 16 bits.
module rev_ripple_adder #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0]   carry;      // carry[i] enters stage i
  logic [WIDTH-1:0] garbage_p;  // garbage outputs of the TSG gates
  logic [WIDTH-1:0] garbage_q;

  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    rev_tsg u_tsg (
      .a (a[i]),
      .b (b[i]),
      .c (1'b0),
      .d (carry[i]),
      .p (garbage_p[i]),
      .q (garbage_q[i]),
      .r (sum[i]),
      .s (carry[i+1])
    );
  end

  assign cout = carry[WIDTH];
endmodule
