// Self-checking testbench for rev_gcd (16-bit GCD processor).
// Runs the two examples of the design description (13,4 -> 1 and 4,2 -> 2,
// including the register-A values shown at each step),
// corner cases (equal operands, 1, 65535 and 1) and random operand pairs.
// For each run it checks the result against a reference GCD, that DONE is
// raised, and that the number of clock cycles from the GO edge to DONE is
// 2 + the number of subtractions done by the subtractive Euclid algorithm.
// Also checks that RESETn aborts a computation and that GO restarts from the
// finished state. Inputs change on the falling edge of clk.
module tb_rev_gcd;
  localparam int unsigned W = 16;
  logic         clk = 1'b0;
  logic         RESETn, GO;
  logic [W-1:0] X, Y, Z;
  logic         DONE;
  int           checks = 0, failures = 0;
  logic [W-1:0] z_seq13 [4] = '{16'd13, 16'd9, 16'd5, 16'd1};

  rev_gcd dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned ref_gcd(int unsigned a, int unsigned b);
    while (b != 0) begin
      int unsigned t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

  function automatic int unsigned ref_steps(int unsigned a, int unsigned b);
    int unsigned n = 0;
    while (a != b) begin
      if (a > b) a -= b; else b -= a;
      n++;
    end
    return n;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Start a computation and wait for DONE; returns the cycle count.
  task automatic run(input logic [W-1:0] x, input logic [W-1:0] y);
    int unsigned cycles = 0;
    int unsigned exp_cycles = ref_steps(x, y) + 2;
    @(negedge clk);
    X = x; Y = y; GO = 1'b1;
    @(negedge clk);
    cycles = 1;
    GO = 1'b0;
    X = $urandom; Y = $urandom;  // operands only matter at the GO edge
    while (!DONE && cycles < exp_cycles + 10) begin
      @(negedge clk);
      cycles++;
    end
    check(DONE === 1'b1, $sformatf("DONE for %0d,%0d", x, y));
    check(Z == W'(ref_gcd(x, y)), $sformatf("gcd(%0d,%0d)=%0d, got %0d", x, y, ref_gcd(x, y), Z));
    check(cycles == exp_cycles, $sformatf("cycles for %0d,%0d: %0d, expected %0d", x, y, cycles, exp_cycles));
    // Result and DONE hold while GO stays low.
    repeat (3) @(negedge clk);
    check(DONE && Z == W'(ref_gcd(x, y)), "result held in finished state");
  endtask

  initial begin
    RESETn = 1'b0; GO = 1'b0; X = '0; Y = '0;
    repeat (3) @(negedge clk);
    RESETn = 1'b1;
    @(negedge clk);
    check(!DONE, "DONE low after reset");

    // Example 1: X = 13, Y = 4. Z shows register A step by step: 13, 9, 5, 1.
    @(negedge clk);
    X = 16'd13; Y = 16'd4; GO = 1'b1;
    @(negedge clk);
    GO = 1'b0;
    foreach (z_seq13[k]) begin
      check(Z == z_seq13[k], $sformatf("13,4 step %0d: Z=%0d expected %0d", k, Z, z_seq13[k]));
      @(negedge clk);
    end
    for (int t = 0; t < 20 && !DONE; t++) @(negedge clk);
    check(DONE && Z == 16'd1, "13,4 result");
    // Example 2: X = 4, Y = 2. Z shows 4, then 2 with DONE.
    X = 16'd4; Y = 16'd2; GO = 1'b1;
    @(negedge clk);
    GO = 1'b0;
    check(Z == 16'd4 && !DONE, "4,2 loaded");
    @(negedge clk);
    check(Z == 16'd2 && !DONE, "4,2 after one subtraction");
    @(negedge clk);
    check(Z == 16'd2 && DONE, "4,2 finished");

    run(16'd13, 16'd4);   // example with result 1
    run(16'd4, 16'd2);    // example with result 2
    run(16'd7, 16'd7);
    run(16'd1, 16'd9);
    run(16'd48, 16'd180);
    run(16'hFFFF, 16'd1);
    for (int k = 0; k < 40; k++) begin
      logic [W-1:0] x, y, f;
      f = W'($urandom_range(1, 60));
      x = f * W'($urandom_range(1, 900));
      y = f * W'($urandom_range(1, 900));
      run(x, y);
    end

    // Reset in the middle of a computation returns to idle.
    @(negedge clk);
    X = 16'd1000; Y = 16'd1; GO = 1'b1;
    @(negedge clk);
    GO = 1'b0;
    repeat (5) @(negedge clk);
    RESETn = 1'b0;
    @(negedge clk);
    RESETn = 1'b1;
    repeat (3) @(negedge clk);
    check(!DONE, "no DONE after reset abort");
    check(Z == 16'd994, $sformatf("A frozen after abort: %0d", Z));  // 6 steps: 5 + the reset edge
    run(16'd30, 16'd12);

    // GO held high in the finished state restarts at once.
    @(negedge clk);
    X = 16'd6; Y = 16'd3; GO = 1'b1;
    @(negedge clk);
    X = 16'd10; Y = 16'd4;
    for (int t = 0; t < 20 && !DONE; t++) @(negedge clk);
    check(Z == 16'd3, "first of back-to-back runs");
    @(negedge clk);  // FIN with GO=1: reload 10,4
    check(!DONE, "restart leaves FIN");
    GO = 1'b0;
    for (int t = 0; t < 20 && !DONE; t++) @(negedge clk);
    check(Z == 16'd2, "second of back-to-back runs");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
