// sc_nn: digital core of the two-layer stochastic-computing neural network.
// A hidden layer of N_HID neurons reads the N_IN input streams; an output layer
// of N_OUT neurons reads the hidden neurons' output streams. Every weight and
// every multiplexer select arrives as its own stochastic stream (from the
// stochastic number generators outside). The activation functions are run in
// phases by en1/dis1 (hidden) and en2/dis2 (output): the hidden layer first
// integrates its sums, then passes its streams on while the output layer
// integrates, then the output layer passes its streams to y_bits.
// The default size, 9-3-2, is the network the document evaluates; the phase
// scheme is this design's choice. One bit per clock per stream.
module sc_nn #(
  parameter int unsigned N_IN       = 9,
  parameter int unsigned N_HID      = 3,
  parameter int unsigned N_OUT      = 2,
  parameter int unsigned STREAM_LEN = 1024
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic [N_IN-1:0]                       x_bits,
  input  logic [N_HID-1:0][N_IN-1:0]            w1_bits,
  input  logic [N_OUT-1:0][N_HID-1:0]           w2_bits,
  input  logic [N_HID-1:0][$clog2(N_IN)-1:0]    sel1,
  input  logic [N_OUT-1:0][$clog2(N_HID)-1:0]   sel2,
  input  logic                                  en1,
  input  logic                                  dis1,
  input  logic                                  en2,
  input  logic                                  dis2,
  output logic [N_HID-1:0]                      h_bits,
  output logic [N_OUT-1:0]                      y_bits,
  output logic [N_HID-1:0]                      h_active,
  output logic [N_OUT-1:0]                      y_active
);
  for (genvar h = 0; h < N_HID; h++) begin : g_hid
    logic unused_sum;
    sc_neuron #(.N_IN(N_IN), .STREAM_LEN(STREAM_LEN)) u_n (
      .clk, .rst_n, .x_bits, .w_bits(w1_bits[h]), .sel(sel1[h]),
      .en(en1), .dis(dis1), .out_bit(h_bits[h]), .sum_bit(unused_sum),
      .active(h_active[h])
    );
  end

  for (genvar o = 0; o < N_OUT; o++) begin : g_out
    logic unused_sum;
    sc_neuron #(.N_IN(N_HID), .STREAM_LEN(STREAM_LEN)) u_n (
      .clk, .rst_n, .x_bits(h_bits), .w_bits(w2_bits[o]), .sel(sel2[o]),
      .en(en2), .dis(dis2), .out_bit(y_bits[o]), .sum_bit(unused_sum),
      .active(y_active[o])
    );
  end
endmodule
