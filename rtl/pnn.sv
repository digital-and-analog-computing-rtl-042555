// pnn: behavioural model of a printed analog neural network.
// This is a behavioural model of an analog circuit, not synthesizable logic.
// Layers of pNeurons (pnn_neuron: crossbar MAC, negative-weight circuits where
// needed, tanh-like activation) are chained: N_IN sensor voltages, hidden
// layers of N_H1 and N_H2 neurons, N_OUT output voltages. The class is the
// output with the highest voltage; a result counts as readable when that
// output is above a threshold (100 mV in the document) and all others are
// below 0 V. The default size 4-4-3-3 is the Iris network of the document;
// the surrogate conductances S1..S3 (nanosiemens, sign = weight sign) are
// placeholders, since the trained values are not published. Every neuron has
// a bias conductance SB (bias voltage 1 V) and decoupling conductance S_D.
module pnn #(
  parameter int unsigned N_IN  = 4,
  parameter int unsigned N_H1  = 4,
  parameter int unsigned N_H2  = 3,
  parameter int unsigned N_OUT = 3,
  // surrogate conductances in nanosiemens; literals list the highest index first
  parameter logic signed [N_H1-1:0][N_IN-1:0][31:0] S1 = {
      { 32'sd20000,  32'sd10000, -32'sd10000, -32'sd10000},
      {-32'sd10000, -32'sd20000,  32'sd10000,  32'sd10000},
      { 32'sd15000, -32'sd10000,  32'sd10000, -32'sd20000},
      { 32'sd5000,  32'sd10000, -32'sd10000,  32'sd20000}},
  parameter logic signed [N_H1-1:0][31:0] SB1 = { 32'sd2000,  32'sd2000,  32'sd2000,  32'sd2000},
  parameter logic signed [N_H2-1:0][N_H1-1:0][31:0] S2 = {
      {-32'sd20000,  32'sd10000,  32'sd10000,  32'sd10000},
      { 32'sd10000, -32'sd10000,  32'sd20000, -32'sd10000},
      {-32'sd5000,  32'sd10000, -32'sd10000,  32'sd20000}},
  parameter logic signed [N_H2-1:0][31:0] SB2 = { 32'sd2000,  32'sd2000,  32'sd2000},
  parameter logic signed [N_OUT-1:0][N_H2-1:0][31:0] S3 = {
      { 32'sd20000, -32'sd10000, -32'sd10000},
      {-32'sd10000,  32'sd20000, -32'sd10000},
      {-32'sd10000, -32'sd10000,  32'sd20000}},
  parameter logic signed [N_OUT-1:0][31:0] SB3 = { 32'sd2000,  32'sd2000,  32'sd2000},
  parameter int S_D = 10000
) (
  input  real x [N_IN],
  output real y [N_OUT]
);
  real h1 [N_H1];
  real h2 [N_H2];

  for (genvar n = 0; n < N_H1; n++) begin : g_l1
    pnn_neuron #(.N(N_IN), .S_NS(S1[n]), .S_B_NS(int'($signed(SB1[n]))), .S_D_NS(S_D)) u_n (.x(x), .y(h1[n]));
  end
  for (genvar n = 0; n < N_H2; n++) begin : g_l2
    pnn_neuron #(.N(N_H1), .S_NS(S2[n]), .S_B_NS(int'($signed(SB2[n]))), .S_D_NS(S_D)) u_n (.x(h1), .y(h2[n]));
  end
  for (genvar n = 0; n < N_OUT; n++) begin : g_l3
    pnn_neuron #(.N(N_H2), .S_NS(S3[n]), .S_B_NS(int'($signed(SB3[n]))), .S_D_NS(S_D)) u_n (.x(h2), .y(y[n]));
  end
endmodule
