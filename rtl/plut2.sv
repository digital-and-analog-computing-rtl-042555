// plut2: one-time programmable 2-input lookup table.
// Two plut1 cells both read in1; a pass-transistor 2:1 multiplexer, selected by
// in2, passes the first cell's output when in2 is 1 and the second cell's when
// in2 is 0:  out = (f1(in1) & in2) | (f2(in1) & !in2).  Any of the 16 two-input
// functions follows from the choice of F1 and F2; the default (F1 = id,
// F2 = inv) is XNOR, the configuration of the printed prototype. Combinational.
module plut2 #(
  parameter pe_pkg::lut1_fn_e F1 = pe_pkg::LUT_ID,
  parameter pe_pkg::lut1_fn_e F2 = pe_pkg::LUT_INV
) (
  input  logic in1,
  input  logic in2,
  output logic out_bit
);
  logic f1_out, f2_out;

  plut1 #(.FN(F1)) u_lut_a (.in_bit(in1), .out_bit(f1_out));
  plut1 #(.FN(F2)) u_lut_b (.in_bit(in1), .out_bit(f2_out));

  // pass-transistor multiplexer
  assign out_bit = in2 ? f1_out : f2_out;
endmodule
