// tb_analog_dt: sweeps both inputs of the analog decision tree over 0..2 V and
// checks the root outputs and the one-hot leaves against thresholds computed
// from the resistor values: a node switches where the channel resistance,
// falling linearly from 1 Mohm at 0 V to 1 kohm at 2 V, equals its printed
// resistor. Inputs within 20 mV of a threshold are skipped.
module tb_analog_dt;
  real x1, x2;
  logic s1, s2, s1b, s2b;
  logic [3:0] c, cb;
  int checks = 0, failures = 0;

  analog_dt dut (.x1, .x2, .s1, .s2, .c);
  analog_dt #(.R_THR('{250.0e3, 750.0e3, 500.0e3})) dut_b (.x1, .x2, .s1(s1b), .s2(s2b), .c(cb));

  function automatic real vth(input real r);
    return 2.0 * (1.0e6 - r) / (1.0e6 - 1.0e3);
  endfunction

  function automatic logic [3:0] leaves(input real a, input real b, input real t0, input real t1, input real t2);
    if (a > t0) return (b > t1) ? 4'b0010 : 4'b0001;
    else        return (b > t2) ? 4'b0100 : 4'b1000;
  endfunction

  function automatic bit near(input real a, input real t);
    return (a > t - 0.02) && (a < t + 0.02);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real t [3];
    real tb_ [3];
    t   = '{vth(500.0e3), vth(500.0e3), vth(500.0e3)};
    tb_ = '{vth(250.0e3), vth(750.0e3), vth(500.0e3)};
    for (int i = 0; i <= 40; i++) begin
      for (int j = 0; j <= 40; j++) begin
        x1 = 0.05 * i; x2 = 0.05 * j;
        #1;
        if (!near(x1, t[0]) && !near(x2, t[1])) begin
          checks++;
          if (c !== leaves(x1, x2, t[0], t[1], t[2]) || s1 !== (x1 > t[0]) || s2 !== !s1) begin
            failures++;
            $display("FAIL default x1=%f x2=%f c=%b s1=%b", x1, x2, c, s1);
          end
        end
        if (!near(x1, tb_[0]) && !near(x2, tb_[1]) && !near(x2, tb_[2])) begin
          checks++;
          if (cb !== leaves(x1, x2, tb_[0], tb_[1], tb_[2])) begin
            failures++;
            $display("FAIL variant x1=%f x2=%f c=%b", x1, x2, cb);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
