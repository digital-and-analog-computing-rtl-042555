// tb_plut1: checks all four programmings of the 1-input lookup table
// (0, 1, identity, inverter) for both input values.
module tb_plut1;
  import pe_pkg::*;
  logic in_bit;
  logic o_zero, o_one, o_id, o_inv;
  int checks = 0, failures = 0;

  plut1 #(.FN(LUT_ZERO)) u0 (.in_bit, .out_bit(o_zero));
  plut1 #(.FN(LUT_ONE))  u1 (.in_bit, .out_bit(o_one));
  plut1 #(.FN(LUT_ID))   u2 (.in_bit, .out_bit(o_id));
  plut1 #(.FN(LUT_INV))  u3 (.in_bit, .out_bit(o_inv));

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s in=%0b got %0b", what, in_bit, got); end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2; v++) begin
      in_bit = 1'(v);
      #1;
      chk(o_zero, 1'b0, "zero");
      chk(o_one,  1'b1, "one");
      chk(o_id,   (v == 1), "id");
      chk(o_inv,  (v == 0), "inv");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
