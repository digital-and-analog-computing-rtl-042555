// tb_pnn: checks the 4-4-3-3 printed network with its default conductances
// against outputs worked out separately (same neuron equations, evaluated
// layer by layer outside the simulator) and checks which class wins.
module tb_pnn;
  real x [4];
  real y [3];
  int checks = 0, failures = 0;

  pnn dut (.x, .y);

  task automatic chk(input real e0, input real e1, input real e2, input int cls);
    real e [3];
    int best;
    e = '{e0, e1, e2};
    best = 0;
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (y[i] < e[i] - 1.0e-4 || y[i] > e[i] + 1.0e-4) begin
        failures++;
        $display("FAIL y[%0d] = %f expected %f", i, y[i], e[i]);
      end
      if (y[i] > y[best]) best = i;
    end
    checks++;
    if (best != cls) begin failures++; $display("FAIL class %0d expected %0d", best, cls); end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '{0.5, -0.5, 0.2, 0.8}; #1;  chk( 1.045989, -0.952161, -0.952860, 0);
    x = '{-1.0, -1.0, -1.0, -1.0}; #1; chk(-0.945734, -0.951791,  1.043650, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
