// Self-checking testbench for rev_ripple_adder at its default 4-bit width.
// Checks the waveform example of the design description (3 + 9 = 12, no
// carry), then every combination of a, b and cin against integer addition.
module tb_rev_ripple_adder;
  localparam int unsigned W = 4;
  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int           checks = 0, failures = 0;

  rev_ripple_adder dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] x, input logic [W-1:0] y, input logic ci);
    logic [W:0] expected;
    a = x; b = y; cin = ci;
    #1;
    expected = (W+1)'(x) + (W+1)'(y) + (W+1)'(ci);
    checks++;
    if ({cout, sum} !== expected) begin
      failures++;
      $display("FAIL %0d + %0d + %0d: expected %0d got %0d", x, y, ci, expected, {cout, sum});
    end
  endtask

  initial begin
    apply(4'h3, 4'h9, 1'b0);
    checks++;
    if (sum !== 4'hc || cout !== 1'b0) failures++;
    for (int v = 0; v < (1 << (2 * W + 1)); v++)
      apply(v[W-1:0], v[2*W-1:W], v[2*W]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
