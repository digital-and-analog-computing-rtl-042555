// sc_neuron: one stochastic-computing neuron.
// Each input stream is multiplied with its weight stream by an XNOR
// (sc_mult), the products are summed by a multiplexer tree (sc_mux_adder,
// scale 1/2^ceil(log2 N_IN)) and the sum passes through the bi-polar ReLU
// (sc_bipolar_relu). One bit per clock; the AF is controlled by en/dis
// (integrate while en=1, output while en=0, clear on dis).
module sc_neuron #(
  parameter int unsigned N_IN       = 3,
  parameter int unsigned STREAM_LEN = 1024
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [N_IN-1:0]         x_bits,
  input  logic [N_IN-1:0]         w_bits,
  input  logic [$clog2(N_IN)-1:0] sel,
  input  logic                    en,
  input  logic                    dis,
  output logic                    out_bit,
  output logic                    sum_bit,
  output logic                    active
);
  logic [N_IN-1:0] prod;

  sc_mult #(.N(N_IN)) u_mult (.a(x_bits), .b(w_bits), .y(prod));

  sc_mux_adder #(.N(N_IN)) u_add (
    .clk, .rst_n, .in_bits(prod), .sel, .y(sum_bit)
  );

  sc_bipolar_relu #(.STREAM_LEN(STREAM_LEN)) u_af (
    .clk, .rst_n, .en, .dis, .in_bit(sum_bit), .out_bit, .active
  );
endmodule
