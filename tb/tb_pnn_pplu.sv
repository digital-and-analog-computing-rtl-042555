// tb_pnn_pplu: checks the piece-wise linear activation: 70 % of a positive
// input, 30 % of a negative one, and a second instance with other slopes.
module tb_pnn_pplu;
  real vi, vo, vo2;
  int checks = 0, failures = 0;

  pnn_pplu dut (.v_in(vi), .v_out(vo));
  pnn_pplu #(.K_POS(1.0), .K_NEG(0.0)) dut2 (.v_in(vi), .v_out(vo2));

  task automatic chk(input real x, input real exp, input real exp2);
    vi = x; #1;
    checks += 2;
    if (vo < exp - 1.0e-9 || vo > exp + 1.0e-9) begin failures++; $display("FAIL pplu(%f)=%f", x, vo); end
    if (vo2 < exp2 - 1.0e-9 || vo2 > exp2 + 1.0e-9) begin failures++; $display("FAIL relu(%f)=%f", x, vo2); end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    chk( 1.0,  0.7,  1.0);
    chk(-1.0, -0.3,  0.0);
    chk( 0.5,  0.35, 0.5);
    chk(-0.2, -0.06, 0.0);
    chk( 0.0,  0.0,  0.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
