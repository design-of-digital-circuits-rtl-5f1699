// Self-checking testbench for rev_dlatch: while en = 1 the output must follow
// d; while en = 0 it must hold the last value whatever d does. Random
// sequences of en and d are compared with a reference model kept here.
module tb_rev_dlatch;
  logic en, d, q;
  logic model;
  int   checks = 0, failures = 0;

  rev_dlatch dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1'b1; d = 1'b0; model = 1'b0;
    #1;
    for (int k = 0; k < 2000; k++) begin
      en = 1'($urandom);
      #1;
      d = 1'($urandom);
      #1;
      if (en) model = d;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL step %0d en=%b d=%b expected %b got %b", k, en, d, model, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
