// tb_sc_nn_top: one full inference of the 9-3-2 mixed-signal stochastic
// network at its default size (1024-bit streams) for two input vectors. The
// expected class and output values are worked out in real numbers from the
// default weights: hidden h = s if s > 0 else -1 with s = sum(x w) / 16,
// outputs the same with the sum scaled by 1/4. Checks the class (output with
// the most ones), the value of the winning output (within 0.1), that the
// losing output is blocked, the hidden decisions and the latency of
// 3*1024 + 2 cycles from start to done.
module tb_sc_nn_top;
  localparam int L = 1024;
  logic clk = 0, rst_n, start;
  real x [9];
  logic [1:0] y_bits, y_active;
  logic [2:0] h_active;
  logic y_valid, done, busy;
  int checks = 0, failures = 0;

  real w1 [3][9] = '{
    '{ 0.8, -0.6,  0.7,  0.5, -0.4,  0.9,  0.6, -0.5,  0.7},
    '{-0.7,  0.6, -0.8, -0.5,  0.5, -0.9, -0.6,  0.4, -0.7},
    '{ 0.5,  0.5,  0.5,  0.5,  0.5,  0.5,  0.5,  0.5,  0.5}};
  real w2 [2][3] = '{'{0.9, -0.9, 0.3}, '{-0.9, 0.9, -0.3}};

  sc_nn_top dut (.clk, .rst_n, .start, .x, .y_bits, .y_valid, .done, .busy, .h_active, .y_active);

  always #5 clk = !clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic infer(input real xv);
    real h [3], o [2], s, val;
    int ones [2], cycles, cls, exp_cls;
    for (int i = 0; i < 9; i++) x[i] = xv;
    for (int j = 0; j < 3; j++) begin
      s = 0.0;
      for (int i = 0; i < 9; i++) s += x[i] * w1[j][i];
      s = s / 16.0;
      h[j] = (s > 0.0) ? s : -1.0;
    end
    for (int k = 0; k < 2; k++) begin
      s = 0.0;
      for (int j = 0; j < 3; j++) s += h[j] * w2[k][j];
      o[k] = s / 4.0;
    end
    exp_cls = (o[1] > o[0]) ? 1 : 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cycles = 1; ones = '{0, 0};
    while (!done) begin
      if (y_valid) for (int k = 0; k < 2; k++) ones[k] += int'(y_bits[k]);
      @(negedge clk);
      cycles++;
    end
    cls = (ones[1] > ones[0]) ? 1 : 0;
    checks += 4;
    if (cycles != 3 * L + 2) begin failures++; $display("FAIL latency %0d", cycles); end
    if (cls != exp_cls) begin failures++; $display("FAIL class %0d expected %0d", cls, exp_cls); end
    val = 2.0 * real'(ones[exp_cls]) / real'(L) - 1.0;
    if (val < o[exp_cls] - 0.1 || val > o[exp_cls] + 0.1) begin failures++; $display("FAIL value %f expected %f", val, o[exp_cls]); end
    if (ones[1 - exp_cls] != 0) begin failures++; $display("FAIL losing output passed %0d ones", ones[1 - exp_cls]); end
    for (int j = 0; j < 3; j++) begin
      checks++;
      if (h_active[j] !== (h[j] > 0.0)) begin failures++; $display("FAIL hidden %0d decision", j); end
    end
    $display("inference x=%f: class %0d, ones %0d/%0d, expected outputs %f %f", xv, cls, ones[0], ones[1], o[0], o[1]);
  endtask

  initial begin
    rst_n = 0; start = 0;
    for (int i = 0; i < 9; i++) x[i] = 0.0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    infer(0.8);
    infer(-0.8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
