// tb_sc_mux_adder: 3-input adder (tree of 4, one padded input). Checks that
// the output equals the selected input (or the 0101 padding stream when the
// spare input is selected), and statistically that bi-polar inputs 0.6, -0.2
// and 0.8 give (0.6 - 0.2 + 0.8 + 0) / 4 = 0.3.
module tb_sc_mux_adder;
  logic clk = 0, rst_n;
  logic [2:0] in_bits;
  logic [1:0] sel;
  logic y;
  int checks = 0, failures = 0;
  int ones = 0, n = 0, pad_seen = 0;
  logic pad_exp;

  sc_mux_adder #(.N(3)) dut (.clk, .rst_n, .in_bits, .sel, .y);

  always #5 clk = !clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real val;
    rst_n = 0; in_bits = 0; sel = 0;
    @(negedge clk); rst_n = 1;
    pad_exp = 1'b0;
    for (int i = 0; i < 40000; i++) begin
      // after reset the padding stream starts at 0 and toggles every clock
      in_bits[0] = ($urandom % 1000) < 800;
      in_bits[1] = ($urandom % 1000) < 400;
      in_bits[2] = ($urandom % 1000) < 900;
      sel = 2'($urandom);
      #1;
      checks++;
      if (sel == 2'd3) begin
        pad_seen++;
        if (y !== pad_exp) begin failures++; $display("FAIL padding stream at %0d", i); end
      end else if (y !== in_bits[sel]) begin
        failures++; $display("FAIL select %0d", sel);
      end
      ones += int'(y); n++;
      @(negedge clk);
      pad_exp = !pad_exp;
    end
    val = 2.0 * real'(ones) / real'(n) - 1.0;
    checks++;
    if (val < 0.28 || val > 0.32) begin failures++; $display("FAIL sum value %f", val); end
    checks++;
    if (pad_seen == 0) begin failures++; $display("FAIL padding never selected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
