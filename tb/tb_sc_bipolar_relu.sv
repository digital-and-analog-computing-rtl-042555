// tb_sc_bipolar_relu: 16-bit streams as in the reference simulation of the
// circuit. For streams with k ones out of 16 it integrates (en=1), then checks
// during the output phase (en=0) that the input passes unchanged only for
// k > 8 and that the output is 0 otherwise; dis clears between streams. Also
// checks that the output stays 0 while integrating.
module tb_sc_bipolar_relu;
  logic clk = 0, rst_n, en, dis, in_bit, out_bit, active;
  int checks = 0, failures = 0;

  sc_bipolar_relu #(.STREAM_LEN(16)) dut (.clk, .rst_n, .en, .dis, .in_bit, .out_bit, .active);

  always #5 clk = !clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_stream(input int k);
    logic [15:0] pattern;
    int placed;
    // k ones at random positions
    pattern = '0; placed = 0;
    while (placed < k) begin
      int p;
      p = int'($urandom % 16);
      if (!pattern[p]) begin pattern[p] = 1'b1; placed++; end
    end
    @(negedge clk); dis = 1; en = 1;
    @(negedge clk); dis = 0;
    for (int i = 0; i < 16; i++) begin
      in_bit = pattern[i];
      #1;
      checks++;
      if (out_bit !== 1'b0) begin failures++; $display("FAIL output during integration"); end
      @(negedge clk);
    end
    en = 0;
    for (int i = 0; i < 16; i++) begin
      in_bit = 1'($urandom);
      #1;
      checks++;
      if (out_bit !== ((k > 8) && in_bit)) begin
        failures++; $display("FAIL k=%0d in=%0b out=%0b", k, in_bit, out_bit);
      end
      @(negedge clk);
    end
  endtask

  initial begin
    rst_n = 0; en = 0; dis = 0; in_bit = 0;
    @(negedge clk); rst_n = 1;
    foreach (ks[i]) run_stream(ks[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ks [10] = '{0, 4, 12, 16, 8, 9, 7, 15, 1, 10};
endmodule
