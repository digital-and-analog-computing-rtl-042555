// tb_pnn_ptanh: checks the tanh-like activation model at points of its fitted curve
// (values worked out separately from 0.046 + tanh((x - 0.054) 9.11))
// and that it rises monotonically over -1..1 V.
module tb_pnn_ptanh;
  real vi, vo;
  int checks = 0, failures = 0;

  pnn_ptanh dut (.v_in(vi), .v_out(vo));

  task automatic chk(input real x, input real exp);
    vi = x; #1;
    checks++;
    if (vo < exp - 1.0e-5 || vo > exp + 1.0e-5) begin
      failures++;
      $display("FAIL ptanh(%f) = %f expected %f", x, vo, exp);
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
    chk(-1.0, -0.954000);
    chk( 0.0, -0.409755);
    chk( 1.0,  1.046000);
    chk( 0.5,  1.045409);
    prev = -10.0;
    for (int i = -20; i <= 20; i++) begin
      vi = 0.05 * i; #1;
      checks++;
      if (!(vo > prev)) begin failures++; $display("FAIL not rising at %f", vi); end
      prev = vo;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
