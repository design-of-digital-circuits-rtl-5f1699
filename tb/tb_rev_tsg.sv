// Self-checking testbench for rev_tsg: applies all input combinations and
// compares every output with the gate's truth table, written here
// independently as P = A, Q = A xor B, R = sum of A+B+D, S = carry of A+B+D xor C.
module tb_rev_tsg;
  logic a, b, c, d;
  logic p, q, r, s;
  int   checks = 0, failures = 0;

  rev_tsg dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {a, b, c, d} = '0;
    for (int v = 0; v < (1 << 4); v++) begin
      logic [3:0] exp_out, got;
      {a, b, c, d} = 4'(v << (4 - 4));
      #1;
      exp_out = {a, a != b, 1'(a + b + d), 1'((32'(a) + 32'(b) + 32'(d)) >> 1) ^ c};
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
