// Self-checking testbench for gcd_output. For every state, reset, GO, GT and
// EQ combination (GT and EQ never both 1, as the comparator cannot produce
// that) the outputs are compared with the control unit's state table,
// written here as a case statement:
//   IDLE 00: GO -> load X,Y, RUN; else stay.      RUN 01: EQ -> FIN;
//   GT -> A <= A-B; LT -> B <= B-A; stay RUN.      FIN 10: DONE; GO -> load, RUN.
//   11 -> IDLE. resetn = 0 forces next state IDLE.
module tb_gcd_output;
  logic resetn, go, gt, eq, s0, s1;
  logic ns0, ns1, la, lb, sa, sb, smin, ssub, done;
  int   checks = 0, failures = 0;

  gcd_output dut (
    .resetn(resetn), .go_c({4{go}}), .gt_c({2{gt}}), .eq_c({3{eq}}),
    .s0_c({7{s0}}), .s1_c({6{s1}}),
    .ns0(ns0), .ns1(ns1), .la(la), .lb(lb), .sa(sa), .sb(sb),
    .smin(smin), .ssub(ssub), .done(done)
  );

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      logic [1:0] st, nst;
      logic       e_la, e_lb, e_sa, e_smin, e_done;
      {resetn, go, gt, eq, s1, s0} = 6'(v);
      if (gt && eq) continue;
      #1;
      st = {s1, s0};
      e_la = 0; e_lb = 0; e_sa = 0; e_smin = 0; e_done = 0;
      case (st)
        2'b00: begin e_sa = 1; if (go) begin e_la = 1; e_lb = 1; nst = 2'b01; end else nst = 2'b00; end
        2'b01: begin
          if (eq) nst = 2'b10;
          else if (gt) begin e_la = 1; nst = 2'b01; end
          else begin e_lb = 1; e_smin = 1; nst = 2'b01; end
        end
        2'b10: begin e_sa = 1; e_done = 1; if (go) begin e_la = 1; e_lb = 1; nst = 2'b01; end else nst = 2'b10; end
        default: nst = 2'b00;
      endcase
      if (!resetn) nst = 2'b00;
      checks++;
      if ({ns1, ns0} !== nst || la !== e_la || lb !== e_lb || sa !== e_sa || sb !== e_sa ||
          smin !== e_smin || ssub !== e_smin || done !== e_done) begin
        failures++;
        $display("FAIL rst=%b go=%b gt=%b eq=%b state=%b: ns=%b la=%b lb=%b sa=%b sb=%b smin=%b ssub=%b done=%b",
                 resetn, go, gt, eq, st, {ns1, ns0}, la, lb, sa, sb, smin, ssub, done);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
