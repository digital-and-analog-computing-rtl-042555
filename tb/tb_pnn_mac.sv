// tb_pnn_mac: checks the crossbar MAC. The default 2-input crossbar
// (100 kohm, 100 kohm, 50 kohm decoupling) must give 0.25*V1 + 0.25*V2
// (+-0.5 V for equal +-1 V inputs, 0 V for opposite ones). A 3-input instance
// with a bias resistor is checked against Kirchhoff's law worked out by hand.
module tb_pnn_mac;
  real v2 [2];
  real v3 [3];
  real vb, vx2, vx3;
  int checks = 0, failures = 0;

  pnn_mac dut (.v_in(v2), .v_bias(0.0), .v_x(vx2));
  // 10 kohm, 20 kohm, 40 kohm inputs; 20 kohm bias; 40 kohm decoupling
  pnn_mac #(.N(3), .G_NS({32'd25000, 32'd50000, 32'd100000}), .G_B_NS(50000), .G_D_NS(25000)) dut3 (
    .v_in(v3), .v_bias(vb), .v_x(vx3));

  task automatic chk(input real got, input real exp, input string what);
    checks++;
    if (got < exp - 1.0e-9 || got > exp + 1.0e-9) begin
      failures++;
      $display("FAIL %s got %f expected %f", what, got, exp);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    v2 = '{1.0, 1.0};   #1; chk(vx2,  0.5, "both +1");
    v2 = '{-1.0, -1.0}; #1; chk(vx2, -0.5, "both -1");
    v2 = '{1.0, -1.0};  #1; chk(vx2,  0.0, "opposite");
    v2 = '{0.4, -0.2};  #1; chk(vx2,  0.05, "mixed");
    // total conductance 250 uS: weights 0.4, 0.2, 0.1, bias 0.2
    vb = 1.0;
    v3 = '{1.0, 1.0, 1.0};   #1; chk(vx3, 0.9, "3-in ones");
    v3 = '{-1.0, 0.5, 2.0};  #1; chk(vx3, -0.4 + 0.1 + 0.2 + 0.2, "3-in mixed");
    vb = 0.0;
    v3 = '{0.0, 0.0, 0.0};   #1; chk(vx3, 0.0, "3-in zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
