// tb_sc_sng: checks the share of ones of a weight SNG (P = 0.25) and of an
// input SNG at x = 0.5 V (P = 0.75) and x = -1 V (P = 0) over 8000 oscillator
// periods, and that a bit only changes after a rising oscillator edge.
module tb_sc_sng;
  logic osc = 0;
  logic ow, oi;
  real x;
  int checks = 0, failures = 0;

  sc_sng #(.P_ONE(0.25)) u_w (.osc, .x(0.0), .out(ow));
  sc_sng #(.INPUT_CONTROLLED(1'b1)) u_i (.osc, .x, .out(oi));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nw, ni;
    logic hold;
    nw = 0; ni = 0; x = 0.5;
    for (int i = 0; i < 8000; i++) begin
      #5 osc = 1;
      #1 hold = ow;
      #4 osc = 0;
      #1;
      checks++;
      if (ow !== hold) begin failures++; $display("FAIL bit changed on falling edge"); end
      nw += int'(ow); ni += int'(oi);
    end
    checks += 2;
    if (real'(nw) / 8000.0 < 0.23 || real'(nw) / 8000.0 > 0.27) begin failures++; $display("FAIL wSNG share %0d", nw); end
    if (real'(ni) / 8000.0 < 0.73 || real'(ni) / 8000.0 > 0.77) begin failures++; $display("FAIL iSNG share %0d", ni); end
    x = -1.0; ni = 0;
    for (int i = 0; i < 500; i++) begin #5 osc = 1; #5 osc = 0; ni += int'(oi); end
    checks++;
    if (ni != 0) begin failures++; $display("FAIL iSNG at -1 V gave ones"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
