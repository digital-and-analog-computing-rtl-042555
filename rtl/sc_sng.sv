// sc_sng: behavioural model of the printed stochastic number generator.
// This is a behavioural model of an analog circuit, not synthesizable logic.
// A ring oscillator (the osc input) repeatedly enables a tuned true random
// number generator, a bi-stable back-to-back inverter pair whose pull-up
// resistor ratio sets the chance of settling to '1'. One new random bit appears
// after each rising osc edge and is held for the period. As a wSNG
// (INPUT_CONTROLLED = 0) the probability is fixed by the printed resistors,
// here the parameter P_ONE; as an iSNG (INPUT_CONTROLLED = 1) an extra input
// transistor makes it follow the analog input x, here P(1) = (x + 1) / 2 for
// x in [-1 V, 1 V], clipped. The linear input mapping is this model's
// assumption.
module sc_sng #(
  parameter bit  INPUT_CONTROLLED = 1'b0,
  parameter real P_ONE            = 0.5
) (
  input  logic osc,
  input  real  x,
  output logic out
);
  initial out = 1'b0;

  always @(posedge osc) begin
    real p;
    p = INPUT_CONTROLLED ? (x + 1.0) / 2.0 : P_ONE;
    if (p < 0.0) p = 0.0;
    if (p > 1.0) p = 1.0;
    out <= (real'($urandom % 32'd1048576) < p * 1048576.0);
  end
endmodule
