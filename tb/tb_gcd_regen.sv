// Self-checking testbench for gcd_regen: for all 32 input combinations every
// copy must equal its source signal.
module tb_gcd_regen;
  logic       go, gt, eq, s0, s1;
  logic [3:0] go_c;
  logic [1:0] gt_c;
  logic [2:0] eq_c;
  logic [6:0] s0_c;
  logic [5:0] s1_c;
  int         checks = 0, failures = 0;

  gcd_regen dut (.*);

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {go, gt, eq, s0, s1} = 5'(v);
      #1;
      checks++;
      if (go_c !== {4{go}} || gt_c !== {2{gt}} || eq_c !== {3{eq}} ||
          s0_c !== {7{s0}} || s1_c !== {6{s1}}) begin
        failures++;
        $display("FAIL inputs %b", v[4:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
