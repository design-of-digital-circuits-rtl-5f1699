// Self-checking testbench for rev_dff: q must take the value of d present
// just before each rising clock edge, and must not change at falling edges
// or while d toggles between edges.
module tb_rev_dff;
  logic clk = 1'b0, d, q;
  logic model;
  int   checks = 0, failures = 0;

  rev_dff dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 1'b0;
    @(negedge clk);
    for (int k = 0; k < 1000; k++) begin
      d = 1'($urandom);
      model = d;
      @(posedge clk);
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL cycle %0d: expected %b got %b", k, model, q);
      end
      d = ~model;          // toggle d while clk is high: q must hold
      #2;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL cycle %0d: q changed while clk high", k);
      end
      @(negedge clk);
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL cycle %0d: q changed at falling edge", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
