// Signal regeneration helper: makes N copies of one signal with a chain of
// N-1 Feynman gates whose B inputs are tied to 0 (P = A, Q = A). Each copy
// may then drive exactly one gate, as reversible logic allows a fan-out of
// one. Combinational.
module rev_fanout #(
  parameter int unsigned N = 2
) (
  input  logic         x,
  output logic [N-1:0] y
);
  logic [N-1:0] chain;  // chain[k] enters gate k; chain[N-1] is the last copy
  assign chain[0] = x;
  for (genvar k = 0; k < N - 1; k++) begin : g_fg
    rev_feynman u_fg (.a(chain[k]), .b(1'b0), .p(y[k]), .q(chain[k+1]));
  end
  assign y[N-1] = chain[N-1];
endmodule
