// plut1: one-time programmable 1-input lookup table.
// The printed circuit is a resistor-load inverter with four pads (supply,
// ground, inverter output, input); printing one connection from the output pad
// to one of them fixes the function to 1, 0, NOT IN or IN. That connection is
// the parameter FN here. Purely combinational.
module plut1 #(
  parameter pe_pkg::lut1_fn_e FN = pe_pkg::LUT_ID
) (
  input  logic in_bit,
  output logic out_bit
);
  import pe_pkg::*;

  always_comb begin
    unique case (FN)
      LUT_ZERO: out_bit = 1'b0;
      LUT_ONE:  out_bit = 1'b1;
      LUT_ID:   out_bit = in_bit;
      LUT_INV:  out_bit = !in_bit;
    endcase
  end
endmodule
