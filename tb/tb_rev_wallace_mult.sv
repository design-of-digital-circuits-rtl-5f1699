// Self-checking testbench for rev_wallace_mult at its default 8 x 8 size.
// Checks the 18 operand/product pairs of the design's simulation example,
// then all 65536 operand combinations against integer multiplication.
module tb_rev_wallace_mult;
  localparam int unsigned W = 8;
  logic [W-1:0]   a, b;
  logic [2*W-1:0] p;
  int             checks = 0, failures = 0;

  rev_wallace_mult dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] x, input logic [W-1:0] y);
    logic [2*W-1:0] expected;
    a = x; b = y;
    #1;
    expected = (2*W)'(x) * (2*W)'(y);
    checks++;
    if (p !== expected) begin
      failures++;
      $display("FAIL %0d * %0d: expected %0d got %0d", x, y, expected, p);
    end
  endtask

  initial begin
    // The operand sequence of the design's simulation example, each with the
    // product shown there.
    apply(8'hbe, 8'haa); checks++; if (p !== 16'h7e2c) failures++;
    apply(8'h24, 8'haa); checks++; if (p !== 16'h17e8) failures++;
    apply(8'h24, 8'h81); checks++; if (p !== 16'h1224) failures++;
    apply(8'h09, 8'h81); checks++; if (p !== 16'h0489) failures++;
    apply(8'h09, 8'h63); checks++; if (p !== 16'h037b) failures++;
    apply(8'h0d, 8'h63); checks++; if (p !== 16'h0507) failures++;
    apply(8'h0d, 8'h8d); checks++; if (p !== 16'h0729) failures++;
    apply(8'h65, 8'h8d); checks++; if (p !== 16'h37a1) failures++;
    apply(8'h65, 8'h12); checks++; if (p !== 16'h071a) failures++;
    apply(8'h01, 8'h12); checks++; if (p !== 16'h0012) failures++;
    apply(8'h01, 8'h0d); checks++; if (p !== 16'h000d) failures++;
    apply(8'h76, 8'h0d); checks++; if (p !== 16'h05fe) failures++;
    apply(8'h76, 8'h3d); checks++; if (p !== 16'h1c1e) failures++;
    apply(8'hed, 8'h3d); checks++; if (p !== 16'h3879) failures++;
    apply(8'hed, 8'h8c); checks++; if (p !== 16'h819c) failures++;
    apply(8'hf9, 8'h8c); checks++; if (p !== 16'h882c) failures++;
    apply(8'hf9, 8'hc6); checks++; if (p !== 16'hc096) failures++;
    apply(8'hc5, 8'hc6); checks++; if (p !== 16'h985e) failures++;
    for (int v = 0; v < (1 << (2 * W)); v++)
      apply(v[W-1:0], v[2*W-1:W]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
