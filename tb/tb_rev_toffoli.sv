// Self-checking testbench for rev_toffoli: applies all input combinations and
// compares every output with the gate's truth table, written here
// independently as P = A, Q = B, R = AB xor C.
module tb_rev_toffoli;
  logic a, b, c, d;
  logic p, q, r, s;
  int   checks = 0, failures = 0;

  rev_toffoli dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

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
    for (int v = 0; v < (1 << 3); v++) begin
      logic [3:0] exp_out, got;
      {a, b, c, d} = 4'(v << (4 - 3));
      #1;
      exp_out = {a, b, (a && b) != c, 1'b0};
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
