// sc_mult: bi-polar stochastic-computing multiplier, one XNOR gate per lane.
// For uncorrelated bi-polar streams (value = 2*P(1) - 1) the XNOR of two
// streams carries the product of their values. N independent lanes; purely
// combinational.
module sc_mult #(
  parameter int unsigned N = 1
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] y
);
  assign y = ~(a ^ b);
endmodule
