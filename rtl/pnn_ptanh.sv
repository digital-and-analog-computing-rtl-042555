// pnn_ptanh: behavioural model of the printed tanh-like activation function.
// This is a behavioural model of an analog circuit, not synthesizable logic.
// Two cascaded resistor-load inverters form a non-inverting buffer with a
// tanh-shaped transfer curve, which also restores the signal swing to about
// +-1 V after each crossbar. It is modelled by the tanh fitted to the measured
// curve:  v_out = A + B * tanh((v_in - C) * D),  with the prototype's fitted
// constants as defaults. No delay.
module pnn_ptanh #(
  parameter real A = 0.046,
  parameter real B = 1.0,
  parameter real C = 0.054,
  parameter real D = 9.11
) (
  input  real v_in,
  output real v_out
);
  always_comb v_out = A + B * $tanh((v_in - C) * D);
endmodule
