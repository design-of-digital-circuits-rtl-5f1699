// Self-checking testbench for gcd_datapath at its default 16-bit width.
// Drives the control inputs directly: random loads of X and Y, random
// subtraction steps in both directions and idle cycles, and compares Z with
// a reference copy of register A and GT/EQ/LT with the comparison of the
// reference registers. Inputs change on the falling edge of clk.
module tb_gcd_datapath;
  localparam int unsigned W = 16;
  logic         clk = 1'b0;
  logic [W-1:0] X, Y, Z;
  logic         LA, LB, SA, SB, SMinuend, SSubtrahend, LT, GT, EQ;
  logic [W-1:0] ra, rb;
  int           checks = 0, failures = 0;

  gcd_datapath dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {LA, LB, SA, SB, SMinuend, SSubtrahend} = '0;
    @(negedge clk);
    X = W'($urandom); Y = W'($urandom);
    LA = 1; LB = 1; SA = 1; SB = 1;
    @(posedge clk);
    ra = X; rb = Y;
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      checks++;
      if (Z !== ra || GT !== (ra > rb) || EQ !== (ra == rb) || LT !== (ra < rb)) begin
        failures++;
        $display("FAIL step %0d: A=%0d B=%0d Z=%0d GT=%b EQ=%b LT=%b", k, ra, rb, Z, GT, EQ, LT);
      end
      X = W'($urandom); Y = W'($urandom);
      if (k % 4 == 0) X = Y;  // equal operands now and then
      SA = 1'($urandom); SB = 1'($urandom);
      LA = 1'($urandom); LB = 1'($urandom);
      SMinuend = 1'($urandom); SSubtrahend = 1'($urandom);
      @(posedge clk);
      begin
        logic [W-1:0] m, s, diff;
        m = SMinuend ? rb : ra;
        s = SSubtrahend ? ra : rb;
        diff = m - s;
        if (LA) ra = SA ? X : diff;
        if (LB) rb = SB ? Y : diff;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
