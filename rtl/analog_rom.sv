// analog_rom: behavioural model of the printed 4x1 resistive read-only memory.
// This is a behavioural model of an analog circuit, not synthesizable logic.
// Each of the four columns holds one printed resistor R_i whose size stores two
// bits. A decoder transistor per column (select v_sel[i]) connects its resistor
// to the supply; the selected resistor and the fixed sense resistor form a
// divider and  v_out = VDD * Rsense / (Rsense + R_i).  Resistances are given
// relative to Rsense in R_RATIO; a negative ratio marks a resistor that was not
// printed (open). The default contents are the printed prototype's: 2*Rsense,
// open, Rsense/2 and about 0 ohm. Several selected columns act in parallel and
// no selection gives 0 V (this model's choice). No delay is modelled.
module analog_rom #(
  parameter real VDD = 1.0,
  parameter real R_RATIO [4] = '{2.0, -1.0, 0.5, 0.0}
) (
  input  logic [3:0] v_sel,
  output real        v_out
);
  always_comb begin
    real g;     // conductance of the selected cells, in units of 1/Rsense
    logic short_cell;
    g = 0.0;
    short_cell = 1'b0;
    for (int i = 0; i < 4; i++) begin
      if (v_sel[i] && R_RATIO[i] >= 0.0) begin
        if (R_RATIO[i] == 0.0) short_cell = 1'b1;
        else g = g + 1.0 / R_RATIO[i];
      end
    end
    if (short_cell) v_out = VDD;
    else            v_out = VDD * g / (g + 1.0);
  end
endmodule
