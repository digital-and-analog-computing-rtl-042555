// tb_pnn_neuron: checks the printed neuron with its default weights
// (surrogate conductances 20, -10, 10 uS, bias 5 uS, decoupling 10 uS)
// against outputs worked out separately from the weight formula, the fitted
// inverter and the fitted tanh.
module tb_pnn_neuron;
  real x [3];
  real y;
  int checks = 0, failures = 0;

  pnn_neuron dut (.x, .y);

  task automatic chk(input real a, input real b, input real c, input real exp);
    x = '{a, b, c}; #1;
    checks++;
    if (y < exp - 1.0e-5 || y > exp + 1.0e-5) begin
      failures++;
      $display("FAIL neuron(%f,%f,%f) = %f expected %f", a, b, c, y, exp);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    chk( 1.0, 1.0, 1.0,  1.045054);
    chk(-1.0, 0.5, 0.2, -0.953452);
    chk( 0.0, 0.0, 0.0,  0.627339);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
