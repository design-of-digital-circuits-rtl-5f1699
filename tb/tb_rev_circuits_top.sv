// End-to-end testbench for rev_circuits_top at its default sizes (4-bit
// adder, 8 x 8 multiplier, 16-bit GCD processor), with no parameter
// overrides. While the GCD processor works through a list of operand pairs
// (the two examples of the design description, corner cases and random
// pairs), the adder and multiplier are exercised with random operands on
// every clock. Results are compared with integer arithmetic and a reference
// GCD, and the GCD cycle count with 2 + the number of subtraction steps.
// Counts, and requires at least once: an adder carry out, a multiplier
// product above 16 bits' half range, a GCD load, an A <= A-B step, a
// B <= B-A step, a finish, a restart straight from the finished state and
// a reset that aborts a computation.
module tb_rev_circuits_top;
  logic [3:0]  add_a, add_b, add_sum;
  logic        add_cin, add_cout;
  logic [7:0]  mul_a, mul_b;
  logic [15:0] mul_p;
  logic        clk = 1'b0, RESETn, GO, DONE;
  logic [15:0] X, Y, Z;
  int          checks = 0, failures = 0;
  int          n_carry = 0, n_bigprod = 0, n_load = 0, n_sub_a = 0, n_sub_b = 0;
  int          n_finish = 0, n_restart = 0, n_abort = 0;
  bit          gcd_busy = 1'b1;

  rev_circuits_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int unsigned ref_gcd(int unsigned a, int unsigned b);
    while (b != 0) begin
      int unsigned t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

  // Step counts: A-B and B-A steps of the subtractive algorithm.
  function automatic int unsigned ref_steps(int unsigned a, int unsigned b);
    int unsigned n = 0;
    while (a != b) begin
      if (a > b) a -= b; else b -= a;
      n++;
    end
    return n;
  endfunction

  // Combinational circuits: new random operands every clock.
  initial begin
    add_a = '0; add_b = '0; add_cin = 0; mul_a = '0; mul_b = '0;
    while (gcd_busy) begin
      @(negedge clk);
      add_a = 4'($urandom); add_b = 4'($urandom); add_cin = 1'($urandom);
      mul_a = 8'($urandom); mul_b = 8'($urandom);
      #1;
      check({add_cout, add_sum} == 5'(add_a) + 5'(add_b) + 5'(add_cin),
            $sformatf("adder %0d+%0d+%0d", add_a, add_b, add_cin));
      check(mul_p == 16'(mul_a) * 16'(mul_b), $sformatf("mult %0d*%0d", mul_a, mul_b));
      if (add_cout) n_carry++;
      if (mul_p[15]) n_bigprod++;
    end
  end

  task automatic gcd_run(input logic [15:0] x, input logic [15:0] y);
    int unsigned cycles = 0;
    int unsigned exp_cycles = ref_steps(x, y) + 2;
    logic [15:0] a = x, b = y;
    @(negedge clk);
    X = x; Y = y; GO = 1'b1;
    @(negedge clk);
    GO = 1'b0;
    cycles = 1;
    n_load++;
    check(Z == x, "A loaded with X");
    while (!DONE && cycles < exp_cycles + 10) begin
      @(negedge clk);
      cycles++;
      // Follow the algorithm alongside: one step per cycle.
      if (a > b) begin a -= b; n_sub_a++; end
      else if (b > a) begin b -= a; n_sub_b++; end
      if (!DONE) check(Z == a, $sformatf("A after step: %0d expected %0d", Z, a));
    end
    if (DONE) n_finish++;
    check(DONE, $sformatf("DONE for %0d,%0d", x, y));
    check(Z == 16'(ref_gcd(x, y)), $sformatf("gcd(%0d,%0d)=%0d got %0d", x, y, ref_gcd(x, y), Z));
    check(cycles == exp_cycles, $sformatf("cycles %0d expected %0d", cycles, exp_cycles));
  endtask

  initial begin
    RESETn = 1'b0; GO = 1'b0; X = '0; Y = '0;
    repeat (3) @(negedge clk);
    RESETn = 1'b1;
    gcd_run(16'd13, 16'd4);
    gcd_run(16'd4, 16'd2);
    gcd_run(16'd1, 16'd1);
    gcd_run(16'd65535, 16'd3);
    gcd_run(16'd2, 16'd65534);
    for (int k = 0; k < 30; k++) begin
      logic [15:0] f;
      f = 16'($urandom_range(1, 200));
      gcd_run(f * 16'($urandom_range(1, 300)), f * 16'($urandom_range(1, 300)));
    end

    // Restart straight from the finished state: GO held while DONE.
    @(negedge clk);
    X = 16'd21; Y = 16'd14; GO = 1'b1;
    @(negedge clk);
    for (int t = 0; t < 100 && !DONE; t++) @(negedge clk);
    check(Z == 16'd7, "first result before restart");
    X = 16'd9; Y = 16'd6;
    @(negedge clk);
    GO = 1'b0;
    check(!DONE && Z == 16'd9, "restart from finished state reloads");
    n_restart++;
    for (int t = 0; t < 100 && !DONE; t++) @(negedge clk);
    check(Z == 16'd3, "result after restart");

    // Reset aborts a long computation.
    @(negedge clk);
    X = 16'd60000; Y = 16'd7; GO = 1'b1;
    @(negedge clk);
    GO = 1'b0;
    repeat (10) @(negedge clk);
    RESETn = 1'b0;
    @(negedge clk);
    RESETn = 1'b1;
    repeat (20) @(negedge clk);
    check(!DONE, "reset aborts the computation");
    check(Z == 16'(60000 - 7 * 11), "A frozen after reset");
    n_abort++;
    gcd_run(16'd100, 16'd75);

    gcd_busy = 1'b0;
    @(negedge clk);
    $display("mechanisms: adder carry=%0d large products=%0d loads=%0d A-B=%0d B-A=%0d finishes=%0d restarts=%0d aborts=%0d",
             n_carry, n_bigprod, n_load, n_sub_a, n_sub_b, n_finish, n_restart, n_abort);
    check(n_carry > 0,   "adder carry out seen");
    check(n_bigprod > 0, "large product seen");
    check(n_load > 0,    "GCD load seen");
    check(n_sub_a > 0,   "A-B step seen");
    check(n_sub_b > 0,   "B-A step seen");
    check(n_finish > 0,  "GCD finish seen");
    check(n_restart > 0, "restart seen");
    check(n_abort > 0,   "reset abort seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
