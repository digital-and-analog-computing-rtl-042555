// tb_sr_latch: checks the set/reset latch against its truth table:
// set, hold, reset, hold, repeated set and reset, and the invalid S=R=1 case
// (both outputs low, then the reset state).
module tb_sr_latch;
  logic s, r, q, qb;
  int checks = 0, failures = 0;

  sr_latch dut (.s, .r, .q, .qb);

  task automatic apply(input logic s_i, input logic r_i, input logic q_exp, input logic qb_exp, input string what);
    s = s_i; r = r_i;
    #10;
    checks++;
    if (q !== q_exp || qb !== qb_exp) begin
      failures++;
      $display("FAIL %s: s=%0b r=%0b q=%0b qb=%0b expected %0b/%0b", what, s_i, r_i, q, qb, q_exp, qb_exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(0, 1, 0, 1, "reset");
    apply(0, 0, 0, 1, "hold 0");
    apply(1, 0, 1, 0, "set");
    apply(0, 0, 1, 0, "hold 1");
    apply(0, 0, 1, 0, "hold 1 again");
    apply(1, 0, 1, 0, "set while set");
    apply(0, 1, 0, 1, "reset");
    apply(0, 0, 0, 1, "hold 0");
    apply(0, 1, 0, 1, "reset while reset");
    apply(1, 0, 1, 0, "set");
    apply(1, 1, 0, 0, "both high");
    apply(0, 0, 0, 1, "after both high");
    for (int i = 0; i < 40; i++) begin
      logic ss, rr;
      ss = 1'($urandom); rr = ss ? 1'b0 : 1'($urandom);
      if (ss)      apply(1, 0, 1, 0, "random set");
      else if (rr) apply(0, 1, 0, 1, "random reset");
      else         apply(0, 0, q, qb, "random hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
