// tb_sc_mult: checks the XNOR multiplier bit by bit on random vectors and
// statistically: for independent bi-polar streams of values 0.5 and -0.6 the
// product stream must carry about -0.3.
module tb_sc_mult;
  logic [3:0] a, b, y;
  int checks = 0, failures = 0;

  sc_mult #(.N(4)) dut (.a, .b, .y);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones;
    real val;
    for (int i = 0; i < 200; i++) begin
      a = 4'($urandom); b = 4'($urandom); #1;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (y[k] !== (a[k] == b[k])) begin failures++; $display("FAIL lane %0d a=%b b=%b y=%b", k, a, b, y); end
      end
    end
    ones = 0;
    for (int i = 0; i < 20000; i++) begin
      a[0] = ($urandom % 1000) < 750;   // value 0.5
      b[0] = ($urandom % 1000) < 200;   // value -0.6
      #1;
      ones += int'(y[0]);
    end
    val = 2.0 * real'(ones) / 20000.0 - 1.0;
    checks++;
    if (val < -0.33 || val > -0.27) begin failures++; $display("FAIL product value %f", val); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
