// tb_sc_neuron: 3-input stochastic neuron with 1024-bit streams. Inputs and
// weights are random streams of known bi-polar value. For a positive weighted
// sum  s = sum(x_i w_i) / 4  the output phase must carry s (within 0.08); for a
// negative sum it must be all zeros (bi-polar -1). Also checks that the
// output stays 0 while integrating and that dis clears the decision.
module tb_sc_neuron;
  localparam int L = 1024;
  logic clk = 0, rst_n, en, dis, out_bit, sum_bit, active;
  logic [2:0] x_bits, w_bits;
  logic [1:0] sel;
  int checks = 0, failures = 0;

  sc_neuron #(.N_IN(3), .STREAM_LEN(L)) dut (
    .clk, .rst_n, .x_bits, .w_bits, .sel, .en, .dis, .out_bit, .sum_bit, .active);

  always #5 clk = !clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic sbit(input real v);
    return real'($urandom % 100000) < (v + 1.0) / 2.0 * 100000.0;
  endfunction

  task automatic drive(input real x [3], input real w [3]);
    for (int i = 0; i < 3; i++) begin x_bits[i] = sbit(x[i]); w_bits[i] = sbit(w[i]); end
    sel = 2'($urandom);
  endtask

  task automatic run(input real x [3], input real w [3]);
    real s, val;
    int ones, leak;
    s = (x[0] * w[0] + x[1] * w[1] + x[2] * w[2]) / 4.0;
    @(negedge clk); dis = 1; en = 1;
    @(negedge clk); dis = 0;
    leak = 0;
    for (int i = 0; i < L; i++) begin drive(x, w); #1 leak += int'(out_bit); @(negedge clk); end
    en = 0; ones = 0;
    for (int i = 0; i < L; i++) begin drive(x, w); #1 ones += int'(out_bit); @(negedge clk); end
    val = 2.0 * real'(ones) / real'(L) - 1.0;
    checks += 2;
    if (leak != 0) begin failures++; $display("FAIL output during integration"); end
    if (s > 0.0) begin
      if (val < s - 0.08 || val > s + 0.08) begin failures++; $display("FAIL s=%f got %f", s, val); end
    end else if (ones != 0) begin
      failures++; $display("FAIL negative s=%f passed %0d ones", s, ones);
    end
    checks++;
    if (active !== (s > 0.0)) begin failures++; $display("FAIL decision for s=%f", s); end
  endtask

  initial begin
    rst_n = 0; en = 0; dis = 0; x_bits = 0; w_bits = 0; sel = 0;
    @(negedge clk); rst_n = 1;
    run('{0.8, 0.6, 0.4}, '{0.9, 0.5, 0.7});      // s = 0.325
    run('{0.8, 0.6, 0.4}, '{-0.9, -0.5, -0.7});   // s = -0.325
    run('{1.0, -1.0, 0.5}, '{0.9, -0.9, 0.2});    // s = 0.475
    run('{-0.5, 0.9, 0.9}, '{0.9, -0.8, -0.6});   // s = -0.43
    @(negedge clk); dis = 1; @(negedge clk); dis = 0;
    checks++;
    if (active) begin failures++; $display("FAIL dis did not clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
