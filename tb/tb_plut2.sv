// tb_plut2: checks the 2-input lookup table in its default XNOR programming
// and in the other programmings listed for common gates (OR, AND, NOR, NAND,
// XOR, constants and single-input functions) over all four input pairs.
module tb_plut2;
  import pe_pkg::*;
  logic in1, in2;
  logic [11:0] o;
  int checks = 0, failures = 0;

  plut2                                  u_xnor (.in1, .in2, .out_bit(o[0]));
  plut2 #(.F1(LUT_ONE),  .F2(LUT_ID))    u_or   (.in1, .in2, .out_bit(o[1]));
  plut2 #(.F1(LUT_ID),   .F2(LUT_ZERO))  u_and  (.in1, .in2, .out_bit(o[2]));
  plut2 #(.F1(LUT_ZERO), .F2(LUT_INV))   u_nor  (.in1, .in2, .out_bit(o[3]));
  plut2 #(.F1(LUT_INV),  .F2(LUT_ONE))   u_nand (.in1, .in2, .out_bit(o[4]));
  plut2 #(.F1(LUT_INV),  .F2(LUT_ID))    u_xor  (.in1, .in2, .out_bit(o[5]));
  plut2 #(.F1(LUT_ZERO), .F2(LUT_ZERO))  u_c0   (.in1, .in2, .out_bit(o[6]));
  plut2 #(.F1(LUT_ONE),  .F2(LUT_ONE))   u_c1   (.in1, .in2, .out_bit(o[7]));
  plut2 #(.F1(LUT_ID),   .F2(LUT_ID))    u_in1  (.in1, .in2, .out_bit(o[8]));
  plut2 #(.F1(LUT_INV),  .F2(LUT_INV))   u_nin1 (.in1, .in2, .out_bit(o[9]));
  plut2 #(.F1(LUT_ONE),  .F2(LUT_ZERO))  u_in2  (.in1, .in2, .out_bit(o[10]));
  plut2 #(.F1(LUT_ZERO), .F2(LUT_ONE))   u_nin2 (.in1, .in2, .out_bit(o[11]));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      logic [11:0] e;
      logic a, b;
      a = v[0]; b = v[1];
      in1 = a; in2 = b;
      #1;
      e = {!b, b, !a, a, 1'b1, 1'b0, a ^ b, !(a & b), !(a | b), a & b, a | b, a ~^ b};
      for (int k = 0; k < 12; k++) begin
        checks++;
        if (o[k] !== e[k]) begin
          failures++;
          $display("FAIL function %0d in1=%0b in2=%0b got %0b expected %0b", k, a, b, o[k], e[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
