// pnn_inv: behavioural model of the printed negative-weight circuit.
// This is a behavioural model of an analog circuit, not synthesizable logic.
// The circuit is a resistor-load inverter between two level-shifting voltage
// dividers; it maps an input in [-1 V, 1 V] to roughly its negative. It is
// modelled by the tanh fitted to the measured transfer curve:
//   v_out = -(A + B * tanh((v_in - C) * D)).
// The defaults are the fitted constants of the prototype. No delay.
module pnn_inv #(
  parameter real A = 0.072,
  parameter real B = 0.82,
  parameter real C = 0.062,
  parameter real D = 5.52
) (
  input  real v_in,
  output real v_out
);
  always_comb v_out = -(A + B * $tanh((v_in - C) * D));
endmodule
