// pnn_pplu: behavioural model of the printed piece-wise linear unit (pPLU).
// This is a behavioural model of an analog circuit, not synthesizable logic.
// One transistor with a gate voltage divider drives a pull-down resistor: for a
// positive input it conducts and the output follows the input, reduced to
// about 70 %; for a negative input it is off and the output is a much smaller
// negative voltage. Modelled as two straight lines through 0 V:
//   v_out = K_POS * v_in (v_in >= 0),  K_NEG * v_in (v_in < 0).
// K_POS follows the document's 70 %; K_NEG = 0.3 is read from the measured
// neuron response and is this model's estimate. No delay.
module pnn_pplu #(
  parameter real K_POS = 0.7,
  parameter real K_NEG = 0.3
) (
  input  real v_in,
  output real v_out
);
  always_comb v_out = (v_in >= 0.0) ? K_POS * v_in : K_NEG * v_in;
endmodule
