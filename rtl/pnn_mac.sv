// pnn_mac: behavioural model of the printed resistor-crossbar MAC.
// This is a behavioural model of an analog circuit, not synthesizable logic.
// Every input voltage drives one printed resistor into a common node; a bias
// resistor ties the node to v_bias and a decoupling resistor to 0 V. By
// Kirchhoff's current law the node settles at
//   v_x = sum_i w_i v_i + w_b v_bias,  w_i = g_i / (sum_j g_j + g_b + g_d),
// so the weights are non-negative and add up to at most 1. Conductances are
// given in nanosiemens; 0 means the resistor is not printed. The defaults are the
// 2-input crossbar prototype (100 kohm inputs, 50 kohm decoupling resistor, no
// bias resistor), whose weights are 0.25, 0.25 and 0.5. Loading by the
// following stage and settling time are not modelled.
module pnn_mac #(
  parameter int unsigned N   = 2,
  parameter logic [N-1:0][31:0] G_NS   = {32'd10000, 32'd10000},
  parameter int unsigned        G_B_NS = 0,
  parameter int unsigned        G_D_NS = 20000
) (
  input  real v_in [N],
  input  real v_bias,
  output real v_x
);
  always_comb begin
    real g_sum, acc;
    g_sum = real'(G_B_NS) + real'(G_D_NS);
    acc   = real'(G_B_NS) * v_bias;
    for (int i = 0; i < int'(N); i++) begin
      g_sum = g_sum + real'(G_NS[i]);
      acc   = acc + real'(G_NS[i]) * v_in[i];
    end
    v_x = (g_sum > 0.0) ? acc / g_sum : 0.0;
  end
endmodule
