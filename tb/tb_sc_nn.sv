// tb_sc_nn: a 3-2-2 network core with 1024-bit streams driven from the
// testbench. The expected output of each layer is worked out in real numbers:
// hidden h_j = s_j if s_j > 0 else -1 with s_j = sum_i x_i w_ji / 4, outputs
// likewise with the sum scaled by 1/2. Checks every activation decision, the
// value of each passing output (within 0.1) and that blocked outputs are 0.
module tb_sc_nn;
  localparam int L = 1024;
  logic clk = 0, rst_n, en1, dis1, en2, dis2;
  logic [2:0] x_bits;
  logic [1:0][2:0] w1_bits;
  logic [1:0][1:0] w2_bits;
  logic [1:0][1:0] sel1;
  logic [1:0][0:0] sel2;
  logic [1:0] h_bits, y_bits, h_active, y_active;
  int checks = 0, failures = 0;

  real x [3];
  real w1 [2][3] = '{'{0.9, 0.7, 0.8}, '{-0.9, -0.7, 0.6}};
  real w2 [2][2] = '{'{0.9, -0.8}, '{-0.9, 0.8}};

  sc_nn #(.N_IN(3), .N_HID(2), .N_OUT(2), .STREAM_LEN(L)) dut (
    .clk, .rst_n, .x_bits, .w1_bits, .w2_bits, .sel1, .sel2,
    .en1, .dis1, .en2, .dis2, .h_bits, .y_bits, .h_active, .y_active);

  always #5 clk = !clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic sbit(input real v);
    return real'($urandom % 100000) < (v + 1.0) / 2.0 * 100000.0;
  endfunction

  task automatic drive();
    for (int i = 0; i < 3; i++) x_bits[i] = sbit(x[i]);
    for (int h = 0; h < 2; h++) for (int i = 0; i < 3; i++) w1_bits[h][i] = sbit(w1[h][i]);
    for (int o = 0; o < 2; o++) for (int h = 0; h < 2; h++) w2_bits[o][h] = sbit(w2[o][h]);
    sel1 = 4'($urandom); sel2 = 2'($urandom);
  endtask

  task automatic run(input real xin [3]);
    real h [2], s, o [2], val;
    int ones [2];
    x = xin;
    for (int j = 0; j < 2; j++) begin
      s = (x[0] * w1[j][0] + x[1] * w1[j][1] + x[2] * w1[j][2]) / 4.0;
      h[j] = (s > 0.0) ? s : -1.0;
    end
    for (int k = 0; k < 2; k++) begin
      s = (h[0] * w2[k][0] + h[1] * w2[k][1]) / 2.0;
      o[k] = s;
    end
    @(negedge clk); dis1 = 1; dis2 = 1; en1 = 0; en2 = 0;
    @(negedge clk); dis1 = 0; en1 = 1;
    for (int i = 0; i < L; i++) begin drive(); @(negedge clk); end
    en1 = 0; dis2 = 0; en2 = 1;
    for (int i = 0; i < L; i++) begin drive(); @(negedge clk); end
    en2 = 0; ones = '{0, 0};
    for (int i = 0; i < L; i++) begin
      drive(); #1;
      for (int k = 0; k < 2; k++) ones[k] += int'(y_bits[k]);
      @(negedge clk);
    end
    for (int j = 0; j < 2; j++) begin
      checks++;
      if (h_active[j] !== (h[j] > 0.0)) begin failures++; $display("FAIL hidden %0d decision", j); end
    end
    for (int k = 0; k < 2; k++) begin
      val = 2.0 * real'(ones[k]) / real'(L) - 1.0;
      checks += 2;
      if (y_active[k] !== (o[k] > 0.0)) begin failures++; $display("FAIL output %0d decision (o=%f)", k, o[k]); end
      if (o[k] > 0.0 && (val < o[k] - 0.1 || val > o[k] + 0.1)) begin failures++; $display("FAIL output %0d value %f expected %f", k, val, o[k]); end
      if (o[k] <= 0.0 && ones[k] != 0) begin failures++; $display("FAIL output %0d not blocked", k); end
    end
  endtask

  initial begin
    rst_n = 0; en1 = 0; en2 = 0; dis1 = 0; dis2 = 0;
    x = '{0.0, 0.0, 0.0}; drive();
    @(negedge clk); rst_n = 1;
    run('{0.9, 0.8, 0.9});    // h = (0.59, -1): outputs 0.665 / -0.665
    run('{-0.9, -0.9, 0.9});  // h = (-1, 0.535): outputs -0.664 / 0.664
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
