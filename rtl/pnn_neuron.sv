// pnn_neuron: behavioural model of the printed neuron (pNeuron).
// This is a behavioural model of an analog circuit, not synthesizable logic.
// A crossbar MAC (pnn_mac) sums the inputs weighted by printed conductances,
// a negative-weight circuit (pnn_inv) is placed in front of each input whose
// weight is negative, and the tanh-like activation (pnn_ptanh) restores the
// swing. Weights are given as surrogate conductances S_NS (nanosiemens, sign =
// weight sign, the literal lists the highest input first); the printed
// conductance is |S|, so the effective weight is
//   w_i = |S_i| / (sum_j |S_j| + |S_B| + |S_D|)
// and the neuron computes
//   y = ptanh( sum_i w_i * (S_i >= 0 ? x_i : inv(x_i)) + w_b * V_BIAS ).
// A weight of 0 means no resistor is printed. V_BIAS = 1 V is this model's
// choice. No delay.
module pnn_neuron #(
  parameter int unsigned N      = 3,
  parameter logic signed [N-1:0][31:0] S_NS = {32'sd10000, -32'sd10000, 32'sd20000},
  parameter int          S_B_NS = 5000,
  parameter int          S_D_NS = 10000,
  parameter real         V_BIAS = 1.0
) (
  input  real x [N],
  output real y
);
  typedef logic [N-1:0][31:0] g_vec_t;
  function automatic g_vec_t abs_g(input logic signed [N-1:0][31:0] s_in);
    g_vec_t r;
    for (int i = 0; i < int'(N); i++) r[i] = ($signed(s_in[i]) < 0) ? -s_in[i] : s_in[i];
    return r;
  endfunction
  localparam g_vec_t G_ABS = abs_g(S_NS);

  real x_inv [N];
  real x_eff [N];
  real v_x;

  for (genvar i = 0; i < N; i++) begin : g_in
    pnn_inv u_inv (.v_in(x[i]), .v_out(x_inv[i]));
  end

  // the inverter output is only wired to the crossbar where the weight is negative
  always_comb begin
    for (int i = 0; i < int'(N); i++) x_eff[i] = ($signed(S_NS[i]) < 0) ? x_inv[i] : x[i];
  end

  pnn_mac #(.N(N), .G_NS(G_ABS), .G_B_NS((S_B_NS < 0) ? -S_B_NS : S_B_NS), .G_D_NS((S_D_NS < 0) ? -S_D_NS : S_D_NS)) u_mac (
    .v_in(x_eff), .v_bias(V_BIAS), .v_x
  );

  pnn_ptanh u_act (.v_in(v_x), .v_out(y));

endmodule
