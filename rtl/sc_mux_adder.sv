// sc_mux_adder: scaled stochastic adder built from 2:1 multiplexers.
// A tree of ceil(log2 N) multiplexer levels picks one of the inputs per clock;
// each level is steered by its own select stream with P(1) = 0.5, so the output
// carries  y = (sum of inputs) / 2^ceil(log2 N)  in bi-polar (or uni-polar)
// encoding. When N is not a power of two the spare tree inputs receive a
// 0,1,0,1... stream (bi-polar value 0) from a toggle flip-flop, which keeps the
// scale factor exact; that padding is this design's choice.
// The multiplexer path is combinational; only the padding toggle is clocked.
module sc_mux_adder #(
  parameter int unsigned N = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         in_bits,
  input  logic [$clog2(N)-1:0] sel,
  output logic                 y
);
  localparam int unsigned K  = $clog2(N);
  localparam int unsigned NP = 2**K;

  logic          zero_stream;
  logic [NP-1:0] padded;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) zero_stream <= 1'b0;
    else        zero_stream <= !zero_stream;
  end

  always_comb begin
    for (int unsigned i = 0; i < NP; i++) padded[i] = (i < N) ? in_bits[i] : zero_stream;
  end

  // level l of the tree is steered by sel[l]; together they index one input
  assign y = padded[sel];
endmodule
