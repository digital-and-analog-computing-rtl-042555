// tb_sc_nn_ctrl: with 8-bit streams, checks the phase sequence after start:
// 1 discharge cycle, 8 hidden-integrate cycles (output layer held discharged),
// 8 output-integrate cycles, 8 output-valid cycles, then done, i.e. done
// 3*8 + 2 cycles after start; checks that start is ignored while busy.
module tb_sc_nn_ctrl;
  localparam int L = 8;
  logic clk = 0, rst_n, start, en1, dis1, en2, dis2, out_valid, done, busy;
  int checks = 0, failures = 0;

  sc_nn_ctrl #(.STREAM_LEN(L)) dut (.clk, .rst_n, .start, .en1, .dis1, .en2, .dis2, .out_valid, .done, .busy);

  always #5 clk = !clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_phase(input logic [5:0] e, input string what);
    checks++;
    if ({en1, dis1, en2, dis2, out_valid, done} !== e) begin
      failures++;
      $display("FAIL %s: en1 dis1 en2 dis2 valid done = %b expected %b", what, {en1, dis1, en2, dis2, out_valid, done}, e);
    end
  endtask

  initial begin
    rst_n = 0; start = 0;
    @(negedge clk); rst_n = 1;
    @(negedge clk); expect_phase(6'b000000, "idle");
    for (int run = 0; run < 2; run++) begin
      start = 1; @(negedge clk); start = 0;
      // cycle 1 after start
      expect_phase(6'b010100, "discharge");
      @(negedge clk);
      for (int i = 0; i < L; i++) begin
        expect_phase(6'b100100, "hidden integrate");
        if (i == 2) start = 1;   // ignored while busy
        @(negedge clk);
        start = 0;
      end
      for (int i = 0; i < L; i++) begin expect_phase(6'b001000, "output integrate"); @(negedge clk); end
      for (int i = 0; i < L; i++) begin expect_phase(6'b000010, "output valid");     @(negedge clk); end
      expect_phase(6'b000001, "done");   // 3L+2 cycles after start
      @(negedge clk);
      expect_phase(6'b000000, "back to idle");
      checks++;
      if (busy) begin failures++; $display("FAIL busy after done"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
