// Self-checking testbench for gcd_control. A reference state machine kept
// here is advanced on every rising edge with the same random GO, GT, EQ and
// RESETn inputs; after each edge the control outputs of the design are
// compared with those the reference state implies. Inputs change on the
// falling edge. Also counts how often each state and each kind of step
// (load, A-B, B-A, finish) was seen and fails if one never happened.
module tb_gcd_control;
  logic clk = 1'b0, RESETn, GO, GT, EQ;
  logic LA, LB, SA, SB, SMinuend, SSubtrahend, DONE;
  int   checks = 0, failures = 0;
  int   n_load = 0, n_sub_a = 0, n_sub_b = 0, n_fin = 0;

  typedef enum logic [1:0] {IDLE = 2'b00, RUN = 2'b01, FIN = 2'b10} state_t;
  state_t st;

  gcd_control dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_outputs();
    logic e_la, e_lb, e_sa, e_smin, e_done;
    e_la = 0; e_lb = 0; e_sa = 0; e_smin = 0; e_done = 0;
    case (st)
      IDLE: begin e_sa = 1; if (GO) begin e_la = 1; e_lb = 1; end end
      RUN:  if (!EQ) begin if (GT) e_la = 1; else begin e_lb = 1; e_smin = 1; end end
      FIN:  begin e_sa = 1; e_done = 1; if (GO) begin e_la = 1; e_lb = 1; end end
      default: ;
    endcase
    checks++;
    if (LA !== e_la || LB !== e_lb || SA !== e_sa || SB !== e_sa || SMinuend !== e_smin ||
        SSubtrahend !== e_smin || DONE !== e_done) begin
      failures++;
      $display("FAIL state %s GO=%b GT=%b EQ=%b: LA=%b LB=%b SA=%b SB=%b SMin=%b SSub=%b DONE=%b",
               st.name(), GO, GT, EQ, LA, LB, SA, SB, SMinuend, SSubtrahend, DONE);
    end
  endtask

  initial begin
    RESETn = 1'b0; GO = 1'b0; GT = 1'b0; EQ = 1'b0;
    repeat (2) @(posedge clk);
    st = IDLE;
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      RESETn = ($urandom_range(0, 99) != 0);
      GO     = ($urandom_range(0, 3) == 0);
      EQ     = ($urandom_range(0, 4) == 0);
      GT     = EQ ? 1'b0 : 1'($urandom);
      #1;
      expect_outputs();
      @(posedge clk);
      // Reference next state.
      case (st)
        IDLE: if (GO) begin st = RUN; n_load++; end
        RUN:  if (EQ) begin st = FIN; n_fin++; end else if (GT) n_sub_a++; else n_sub_b++;
        FIN:  if (GO) begin st = RUN; n_load++; end
        default: st = IDLE;
      endcase
      if (!RESETn) st = IDLE;
    end
    checks++;
    if (n_load == 0 || n_sub_a == 0 || n_sub_b == 0 || n_fin == 0) begin
      failures++;
      $display("FAIL coverage load=%0d subA=%0d subB=%0d fin=%0d", n_load, n_sub_a, n_sub_b, n_fin);
    end
    $display("steps: load=%0d A-B=%0d B-A=%0d finish=%0d", n_load, n_sub_a, n_sub_b, n_fin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
