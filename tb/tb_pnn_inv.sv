// tb_pnn_inv: checks the negative-weight model at points of its fitted curve
// (values worked out separately from -(0.072 + 0.82 tanh((x - 0.062) 5.52)))
// and that it falls monotonically over -1..1 V.
module tb_pnn_inv;
  real vi, vo;
  int checks = 0, failures = 0;

  pnn_inv dut (.v_in(vi), .v_out(vo));

  task automatic chk(input real x, input real exp);
    vi = x; #1;
    checks++;
    if (vo < exp - 1.0e-5 || vo > exp + 1.0e-5) begin
      failures++;
      $display("FAIL inv(%f) = %f expected %f", x, vo, exp);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real prev;
    chk(-1.0,  0.747987);
    chk( 0.0,  0.198170);
    chk( 1.0, -0.891948);
    chk( 0.5, -0.879077);
    prev = 10.0;
    for (int i = -20; i <= 20; i++) begin
      vi = 0.05 * i; #1;
      checks++;
      if (!(vo < prev)) begin failures++; $display("FAIL not falling at %f", vi); end
      prev = vo;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
