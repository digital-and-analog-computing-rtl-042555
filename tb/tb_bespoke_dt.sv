// tb_bespoke_dt: applies all 16 inputs of the 2-feature, 2-bit tree and checks
// the one-hot class against the tree written out by hand:
// x1 < 2: (x2 < 2 ? C1 : C2), x1 >= 2: (x1 < 3 ? C3 : C4).
// A second instance with other node features and thresholds (root x2 vs 1,
// left x1 vs 3, right x2 vs 2) checks the generic parameters.
module tb_bespoke_dt;
  logic [1:0][1:0] x;
  logic [3:0] cls;
  logic [3:0] cls1;
  int checks = 0, failures = 0;

  bespoke_dt dut (.x, .cls);
  bespoke_dt #(.NODE_FEAT('{1, 0, 1}), .NODE_THR('{1, 3, 2})) dut1 (.x, .cls(cls1));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int x1, x2;
      logic [3:0] e;
      x1 = v % 4; x2 = v / 4;
      x[0] = 2'(x1); x[1] = 2'(x2);
      #1;
      if (x1 < 2) e = (x2 < 2) ? 4'b0001 : 4'b0010;
      else        e = (x1 < 3) ? 4'b0100 : 4'b1000;
      checks++;
      if (cls !== e) begin
        failures++;
        $display("FAIL x1=%0d x2=%0d cls=%b expected %b", x1, x2, cls, e);
      end
      checks++;
      if (x2 >= 1) e = (x2 >= 2) ? 4'b1000 : 4'b0100;
      else         e = (x1 >= 3) ? 4'b0010 : 4'b0001;
      if (cls1 !== e) begin
        failures++;
        $display("FAIL variant x1=%0d x2=%0d cls=%b", x1, x2, cls1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
