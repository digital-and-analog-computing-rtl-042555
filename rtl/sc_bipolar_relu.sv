// sc_bipolar_relu: stochastic-computing activation function (bi-polar ReLU).
// In the printed circuit a capacitor is charged by each '1' and discharged by
// each '0' of the input stream while EN is high; when EN falls the capacitor
// voltage is held and decides whether the input stream is passed to the output
// or the output is held at 0 (bi-polar -1). DIS empties the capacitor before
// the next stream. Here the capacitor is a signed up/down counter: +1 per '1',
// -1 per '0' while en is high, cleared by dis. While en is low the output is
// in_bit AND (count > 0), so a stream with more than half '1's passes
// unchanged (slope 1 for positive values) and any other gives all zeros.
// Timing: the count updates on the clock edge after each integrated bit; the
// output path from in_bit is combinational. dis has priority over en.
// The counter in place of the capacitor is this design's choice.
module sc_bipolar_relu #(
  parameter int unsigned STREAM_LEN = 1024
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic dis,
  input  logic in_bit,
  output logic out_bit,
  output logic active
);
  localparam int unsigned CW = $clog2(STREAM_LEN + 1) + 2;

  logic signed [CW-1:0] charge;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   charge <= '0;
    else if (dis) charge <= '0;
    else if (en)  charge <= in_bit ? charge + CW'(1) : charge - CW'(1);
  end

  assign active  = (charge > 0);
  assign out_bit = !en && active && in_bit;
endmodule
