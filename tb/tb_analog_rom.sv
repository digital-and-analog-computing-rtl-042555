// tb_analog_rom: reads each of the four cells of the resistive ROM and checks
// the divider voltage VDD*Rsense/(Rsense+R_i) for the prototype contents
// (2*Rsense, open, Rsense/2, short): 1/3 V, 0 V, 2/3 V and 1 V. Also checks
// the idle output, two cells selected together, and a second content set.
module tb_analog_rom;
  logic [3:0] sel;
  real v, v2;
  int checks = 0, failures = 0;

  analog_rom dut (.v_sel(sel), .v_out(v));
  analog_rom #(.VDD(2.0), .R_RATIO('{1.0, 3.0, -1.0, 1.0})) dut2 (.v_sel(sel), .v_out(v2));

  task automatic chk(input real got, input real exp, input string what);
    checks++;
    if (got < exp - 1.0e-6 || got > exp + 1.0e-6) begin
      failures++;
      $display("FAIL %s sel=%b got %f expected %f", what, sel, got, exp);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sel = 4'b0000; #1; chk(v, 0.0, "idle");
    sel = 4'b0001; #1; chk(v, 1.0 / 3.0, "cell 1"); chk(v2, 1.0, "variant cell 1");
    sel = 4'b0010; #1; chk(v, 0.0, "cell 2");       chk(v2, 0.5, "variant cell 2");
    sel = 4'b0100; #1; chk(v, 2.0 / 3.0, "cell 3"); chk(v2, 0.0, "variant cell 3");
    sel = 4'b1000; #1; chk(v, 1.0, "cell 4");       chk(v2, 1.0, "variant cell 4");
    // cells 1 and 3 in parallel: 2*Rs || Rs/2 = 0.4 Rs
    sel = 4'b0101; #1; chk(v, 1.0 / 1.4, "cells 1+3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
