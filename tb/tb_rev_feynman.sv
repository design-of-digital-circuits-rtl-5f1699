// Self-checking testbench for rev_feynman: applies all input combinations and
// compares every output with the gate's truth table, written here
// independently as P = A, Q = A xor B.
module tb_rev_feynman;
  logic a, b, c, d;
  logic p, q, r, s;
  assign r = 1'b0;
  int   checks = 0, failures = 0;

  rev_feynman dut (.a(a), .b(b), .p(p), .q(q));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {a, b, c, d} = '0;
    s = 1'b0;
    for (int v = 0; v < (1 << 2); v++) begin
      logic [3:0] exp_out, got;
      {a, b, c, d} = 4'(v << (4 - 2));
      #1;
      exp_out = {a, a != b, 1'b0, 1'b0};
      got = {p, q, r, s};
      checks++;
      if (got !== exp_out) begin
        failures++;
        $display("FAIL in=%b expected pqrs=%b got %b", v[3:0], exp_out, got);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
