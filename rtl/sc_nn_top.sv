// sc_nn_top: mixed-signal stochastic-computing neural network.
// Analog input voltages x (in [-1 V, 1 V]) are turned into bit streams by
// input-controlled SNGs; every weight has its own one-time tuned SNG whose
// probability encodes the bi-polar weight, P(1) = (w + 1) / 2; every
// multiplexer level has a select SNG with P(1) = 0.5. The streams feed the
// 9-3-2 network core (sc_nn) whose activation phases come from sc_nn_ctrl.
// clk stands for the printed ring oscillator that paces all SNGs. After start,
// the output streams y_bits are valid while y_valid is high (STREAM_LEN
// cycles); the share of '1's per output gives its value and the class is the
// output with the most '1's. h_active / y_active show each activation
// function's held decision (more than half '1's integrated). done pulses 3*STREAM_LEN + 2 cycles after start.
// The default weights are placeholders: the document gives no trained values.
// Contains behavioural SNG models, so it is not synthesizable as a whole.
// The hidden-layer streams h_bits are used only inside the core; the lint
// warning that they are unused at this level is expected.
module sc_nn_top #(
  parameter int unsigned N_IN       = 9,
  parameter int unsigned N_HID      = 3,
  parameter int unsigned N_OUT      = 2,
  parameter int unsigned STREAM_LEN = 1024,
  // Bi-polar weights in thousandths (-1000 .. 1000). The literals list the
  // highest index first: W1[h][i] is row h from the bottom, column i from the right.
  parameter logic signed [N_HID-1:0][N_IN-1:0][11:0] W1 = {
      { 12'sd500,  12'sd500,  12'sd500,  12'sd500,  12'sd500,  12'sd500,  12'sd500,  12'sd500,  12'sd500},
      {-12'sd700,  12'sd400, -12'sd600, -12'sd900,  12'sd500, -12'sd500, -12'sd800,  12'sd600, -12'sd700},
      { 12'sd700, -12'sd500,  12'sd600,  12'sd900, -12'sd400,  12'sd500,  12'sd700, -12'sd600,  12'sd800}},
  parameter logic signed [N_OUT-1:0][N_HID-1:0][11:0] W2 = {
      {-12'sd300,  12'sd900, -12'sd900},
      { 12'sd300, -12'sd900,  12'sd900}}
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  real              x [N_IN],
  output logic [N_OUT-1:0] y_bits,
  output logic             y_valid,
  output logic             done,
  output logic             busy,
  output logic [N_HID-1:0] h_active,
  output logic [N_OUT-1:0] y_active
);
  localparam int unsigned K1 = $clog2(N_IN);
  localparam int unsigned K2 = $clog2(N_HID);

  logic [N_IN-1:0]                x_bits;
  logic [N_HID-1:0][N_IN-1:0]     w1_bits;
  logic [N_OUT-1:0][N_HID-1:0]    w2_bits;
  logic [N_HID-1:0][K1-1:0]       sel1;
  logic [N_OUT-1:0][K2-1:0]       sel2;
  logic en1, dis1, en2, dis2;
  logic [N_HID-1:0] h_bits;

  for (genvar i = 0; i < N_IN; i++) begin : g_isng
    sc_sng #(.INPUT_CONTROLLED(1'b1)) u_sng (.osc(clk), .x(x[i]), .out(x_bits[i]));
  end

  for (genvar h = 0; h < N_HID; h++) begin : g_w1
    for (genvar i = 0; i < N_IN; i++) begin : g_in
      sc_sng #(.P_ONE(real'(int'($signed(W1[h][i])) + 1000) / 2000.0)) u_sng (.osc(clk), .x(0.0), .out(w1_bits[h][i]));
    end
    for (genvar k = 0; k < K1; k++) begin : g_sel
      sc_sng #(.P_ONE(0.5)) u_sng (.osc(clk), .x(0.0), .out(sel1[h][k]));
    end
  end

  for (genvar o = 0; o < N_OUT; o++) begin : g_w2
    for (genvar h = 0; h < N_HID; h++) begin : g_in
      sc_sng #(.P_ONE(real'(int'($signed(W2[o][h])) + 1000) / 2000.0)) u_sng (.osc(clk), .x(0.0), .out(w2_bits[o][h]));
    end
    for (genvar k = 0; k < K2; k++) begin : g_sel
      sc_sng #(.P_ONE(0.5)) u_sng (.osc(clk), .x(0.0), .out(sel2[o][k]));
    end
  end

  sc_nn_ctrl #(.STREAM_LEN(STREAM_LEN)) u_ctrl (
    .clk, .rst_n, .start, .en1, .dis1, .en2, .dis2,
    .out_valid(y_valid), .done, .busy
  );

  sc_nn #(.N_IN(N_IN), .N_HID(N_HID), .N_OUT(N_OUT), .STREAM_LEN(STREAM_LEN)) u_nn (
    .clk, .rst_n, .x_bits, .w1_bits, .w2_bits, .sel1, .sel2,
    .en1, .dis1, .en2, .dis2, .h_bits, .y_bits, .h_active, .y_active
  );
endmodule
