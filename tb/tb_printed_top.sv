// tb_printed_top: end-to-end run of every circuit in printed_top at default
// sizes. Each circuit is driven through its operations and checked against
// values worked out independently; the test also counts how often each
// mechanism happened and fails if one never did: latch set / reset / hold,
// LUT output 0 / 1, every class of the digital and analog trees, every ROM
// level, stochastic activation functions passing and blocking (hidden and
// output layer), a full stochastic inference per class, analog network
// classes with a readable margin, and the pPLU neuron's positive and
// negative branches.
module tb_printed_top;
  localparam int L = 1024;
  logic clk = 0, rst_n;
  logic latch_s, latch_r, latch_q, latch_qb;
  logic lut_in1, lut_in2, lut_out;
  logic [1:0][1:0] dt_x;
  logic [3:0] dt_cls;
  real adt_x1, adt_x2;
  logic adt_s1, adt_s2;
  logic [3:0] adt_c;
  logic [3:0] rom_sel;
  real rom_vout;
  logic sc_start;
  real sc_x [9];
  logic [1:0] sc_y_bits, sc_y_active;
  logic sc_y_valid, sc_done, sc_busy;
  logic [2:0] sc_h_active;
  real pnn_x [4];
  real pnn_y [3];
  real n2_v [2];
  real n2_vout;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_set, n_reset, n_hold, n_lut0, n_lut1, n_af_pass, n_af_block, n_hid_pass, n_hid_block, n_pplu_pos, n_pplu_neg, n_pnn_readable;
  int n_dt [4], n_adt [4], n_rom [4], n_sc_cls [2], n_pnn_cls [3];

  printed_top dut (.*);

  always #5 clk = !clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic bit close(input real a, input real b, input real tol);
    return (a > b - tol) && (a < b + tol);
  endfunction

  task automatic latch_step(input logic s, input logic r);
    logic q_before;
    q_before = latch_q;
    latch_s = s; latch_r = r; #2;
    if (s)      begin n_set++;   chk(latch_q && !latch_qb, "latch set"); end
    else if (r) begin n_reset++; chk(!latch_q && latch_qb, "latch reset"); end
    else        begin n_hold++;  chk(latch_q == q_before && latch_qb == !q_before, "latch hold"); end
  endtask

  task automatic sc_infer(input real xv, input int exp_cls);
    int ones [2];
    for (int i = 0; i < 9; i++) sc_x[i] = xv;
    @(negedge clk); sc_start = 1; @(negedge clk); sc_start = 0;
    ones = '{0, 0};
    while (!sc_done) begin
      if (sc_y_valid) for (int k = 0; k < 2; k++) ones[k] += int'(sc_y_bits[k]);
      @(negedge clk);
    end
    for (int j = 0; j < 3; j++) if (sc_h_active[j]) n_hid_pass++; else n_hid_block++;
    for (int k = 0; k < 2; k++) if (sc_y_active[k]) n_af_pass++; else n_af_block++;
    chk(((ones[1] > ones[0]) ? 1 : 0) == exp_cls, "stochastic network class");
    chk(ones[1 - exp_cls] == 0 && ones[exp_cls] > L / 2, "stochastic network output levels");
    n_sc_cls[exp_cls]++;
  endtask

  task automatic pnn_eval(input real x0, input real x1, input real x2, input real x3, input real e0, input real e1, input real e2);
    real e [3];
    int best;
    bit readable;
    pnn_x = '{x0, x1, x2, x3}; #1;
    e = '{e0, e1, e2};
    best = 0;
    for (int i = 0; i < 3; i++) begin
      chk(close(pnn_y[i], e[i], 1.0e-4), "analog network output");
      if (pnn_y[i] > pnn_y[best]) best = i;
    end
    readable = pnn_y[best] > 0.1;
    for (int i = 0; i < 3; i++) if (i != best && pnn_y[i] >= 0.0) readable = 0;
    if (readable) n_pnn_readable++;
    n_pnn_cls[best]++;
  endtask

  initial begin
    rst_n = 0; sc_start = 0;
    latch_s = 0; latch_r = 1; lut_in1 = 0; lut_in2 = 0; dt_x = '0;
    adt_x1 = 0.0; adt_x2 = 0.0; rom_sel = '0;
    for (int i = 0; i < 9; i++) sc_x[i] = 0.0;
    pnn_x = '{0.0, 0.0, 0.0, 0.0}; n2_v = '{0.0, 0.0};
    repeat (2) @(negedge clk);
    rst_n = 1;

    // SR latch
    latch_step(0, 1); latch_step(0, 0); latch_step(1, 0); latch_step(0, 0); latch_step(0, 0);
    latch_step(0, 1); latch_step(0, 0); latch_step(1, 0);

    // 2-input LUT programmed as XNOR
    for (int v = 0; v < 4; v++) begin
      lut_in1 = v[0]; lut_in2 = v[1]; #1;
      chk(lut_out == (v[0] == v[1]), "LUT XNOR");
      if (lut_out) n_lut1++; else n_lut0++;
    end

    // bespoke digital tree, all inputs
    for (int v = 0; v < 16; v++) begin
      int x1, x2, c;
      x1 = v % 4; x2 = v / 4;
      dt_x[0] = 2'(x1); dt_x[1] = 2'(x2); #1;
      c = (x1 < 2) ? ((x2 < 2) ? 0 : 1) : ((x1 < 3) ? 2 : 3);
      chk(dt_cls == 4'(1 << c), "digital tree class");
      n_dt[c]++;
    end

    // analog tree: thresholds near 1 V for all nodes
    for (int i = 0; i < 4; i++) begin
      int c;
      adt_x1 = (i < 2) ? 1.6 : 0.4;
      adt_x2 = (i % 2 == 0) ? 0.3 : 1.8;
      #1;
      c = (i == 0) ? 0 : (i == 1) ? 1 : (i == 2) ? 3 : 2;
      chk(adt_c == 4'(1 << c) && adt_s1 == (i < 2) && adt_s2 == (i >= 2), "analog tree leaf");
      n_adt[c]++;
    end

    // ROM: four cells
    for (int i = 0; i < 4; i++) begin
      real e [4];
      e = '{1.0 / 3.0, 0.0, 2.0 / 3.0, 1.0};
      rom_sel = 4'(1 << i); #1;
      chk(close(rom_vout, e[i], 1.0e-6), "ROM level");
      n_rom[i]++;
    end
    rom_sel = '0;

    // analog network (reference values worked out outside the simulator)
    pnn_eval(0.5, -0.5, 0.2, 0.8, 1.045989, -0.952161, -0.952860);
    pnn_eval(-1.0, -1.0, -1.0, -1.0, -0.945734, -0.951791, 1.043650);

    // 2-input neuron prototype with the pPLU: w1 = w2 = 1/(2 + 1/30)
    n2_v = '{1.0, 1.0}; #1;
    chk(close(n2_vout, 0.7 * 2.0 / (2.0 + 1.0 / 30.0), 1.0e-6), "pPLU neuron both +1"); n_pplu_pos++;
    n2_v = '{-1.0, -1.0}; #1;
    chk(close(n2_vout, -0.3 * 2.0 / (2.0 + 1.0 / 30.0), 1.0e-6), "pPLU neuron both -1"); n_pplu_neg++;
    n2_v = '{1.0, -1.0}; #1;
    chk(close(n2_vout, 0.0, 1.0e-6), "pPLU neuron opposite");

    // stochastic network, one inference per class
    sc_infer(0.8, 0);
    sc_infer(-0.8, 1);

    // every mechanism must have happened
    chk(n_set > 0 && n_reset > 0 && n_hold > 0, "latch set/reset/hold exercised");
    chk(n_lut0 > 0 && n_lut1 > 0, "LUT both outputs exercised");
    for (int i = 0; i < 4; i++) chk(n_dt[i] > 0, "digital tree class reached");
    for (int i = 0; i < 4; i++) chk(n_adt[i] > 0, "analog tree leaf reached");
    for (int i = 0; i < 4; i++) chk(n_rom[i] > 0, "ROM level read");
    chk(n_af_pass > 0 && n_af_block > 0, "output activation pass and block");
    chk(n_hid_pass > 0 && n_hid_block > 0, "hidden activation pass and block");
    chk(n_sc_cls[0] > 0 && n_sc_cls[1] > 0, "stochastic network both classes");
    chk(n_pnn_cls[0] > 0 && n_pnn_cls[2] > 0 && n_pnn_readable == 2, "analog network classes readable");
    chk(n_pplu_pos > 0 && n_pplu_neg > 0, "pPLU both branches");
    $display("mechanisms: set %0d reset %0d hold %0d | AF pass %0d block %0d | hidden pass %0d block %0d",
             n_set, n_reset, n_hold, n_af_pass, n_af_block, n_hid_pass, n_hid_block);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
