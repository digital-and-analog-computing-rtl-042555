// sc_workload_unit: test harness that runs one stochastic network topology
// (sc_nn_top with N_IN-N_HID-N_OUT) through RUNS inferences and checks every
// result against an expected-value model. Weights follow a fixed pattern in
// {-0.8, -0.4, 0.3, 0.4, 0.8} chosen by SEED. Input signs follow a random
// +/- mix of the weight rows (so hidden sums lean away from zero even for
// wide layers) and magnitudes lie in 0.7..1. For each run the model computes
//   hidden sum  s_h = sum_i w1[h][i] x[i] / 2^ceil(log2 N_IN)
//   hidden out  g_h = s_h if s_h > 0 else -1   (blocked stream is all zeros)
//   output sum  u_o = sum_h w2[o][h] g_h / 2^ceil(log2 N_HID)
// and output o should carry about L (u_o + 1) / 2 ones if u_o > 0, else none.
// Inputs are redrawn (in the model only) until every sum, or after 1000
// tries every hidden sum, is at least MARGIN away from 0. Only such values
// are checked, so that stream noise cannot flip a decision: every run checks
// the start-to-done latency of 3L + 2 cycles and each clear hidden decision;
// a run whose hidden sums are all clear also checks each clear output's
// decision and ones count (within 0.07 L) and counts as a checked run.
// Results leave through ports; finished goes high after the last run.
module sc_workload_unit #(
  parameter int unsigned N_IN   = 4,
  parameter int unsigned N_HID  = 3,
  parameter int unsigned N_OUT  = 3,
  parameter int unsigned L      = 1024,
  parameter int unsigned SEED   = 0,
  parameter int unsigned RUNS   = 8,
  parameter real         MARGIN = 0.15
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   checked_runs,
  output int   n_hid_pass,
  output int   n_hid_block,
  output int   n_out_pass,
  output int   n_out_block,
  output logic finished
);
  typedef logic signed [N_HID-1:0][N_IN-1:0][11:0] w1_t;
  typedef logic signed [N_OUT-1:0][N_HID-1:0][11:0] w2_t;

  function automatic int pattern(input int unsigned a, input int unsigned b);
    int k;
    k = int'((a * 7 + b * 3 + SEED) % 5);
    return (k == 0) ? -800 : (k == 1) ? -400 : (k == 2) ? 300 : (k == 3) ? 400 : 800;
  endfunction

  function automatic w1_t mk_w1();
    w1_t w;
    for (int unsigned h = 0; h < N_HID; h++)
      for (int unsigned i = 0; i < N_IN; i++) w[h][i] = 12'(pattern(h, i));
    return w;
  endfunction

  function automatic w2_t mk_w2();
    w2_t w;
    for (int unsigned o = 0; o < N_OUT; o++)
      for (int unsigned h = 0; h < N_HID; h++) w[o][h] = 12'(pattern(o + 11, h + 5));
    return w;
  endfunction

  localparam w1_t W1 = mk_w1();
  localparam w2_t W2 = mk_w2();

  logic start;
  real x [N_IN];
  logic [N_OUT-1:0] y_bits, y_active;
  logic [N_HID-1:0] h_active;
  logic y_valid, done, busy;

  sc_nn_top #(.N_IN(N_IN), .N_HID(N_HID), .N_OUT(N_OUT), .STREAM_LEN(L), .W1(W1), .W2(W2)) u_net (
    .clk, .rst_n, .start, .x, .y_bits, .y_valid, .done, .busy, .h_active, .y_active
  );

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0d-%0d-%0d: %s", N_IN, N_HID, N_OUT, what);
    end
  endtask

  initial begin
    real s [N_HID];
    real c [N_HID];
    real g [N_HID];
    real u [N_OUT];
    int ones [N_OUT];
    int cycles;
    bit hid_clear, all_clear;
    real expect_ones;
    checks = 0; failures = 0; checked_runs = 0; finished = 1'b0;
    n_hid_pass = 0; n_hid_block = 0; n_out_pass = 0; n_out_block = 0;
    start = 1'b0;
    for (int i = 0; i < int'(N_IN); i++) x[i] = 0.0;
    @(posedge rst_n);
    for (int run = 0; run < int'(RUNS); run++) begin
      // draw inputs until every sum is clear of zero (model only, no simulation)
      for (int tries = 0; tries < 2000; tries++) begin
        all_clear = 1'b1;
        // input signs follow a random +/- mix of the weight rows, so that the
        // hidden sums are pushed away from zero even for wide layers
        for (int h = 0; h < int'(N_HID); h++) c[h] = ($urandom % 2 != 0) ? 1.0 : -1.0;
        for (int i = 0; i < int'(N_IN); i++) begin
          real d;
          d = 0.0;
          for (int h = 0; h < int'(N_HID); h++) d += c[h] * real'(int'($signed(W1[h][i])));
          if ($urandom % 4 == 0) d = -d;
          x[i] = ((d >= 0.0) ? 1.0 : -1.0) * (0.7 + real'($urandom % 4) / 10.0);
        end
        hid_clear = 1'b1;
        for (int h = 0; h < int'(N_HID); h++) begin
          s[h] = 0.0;
          for (int i = 0; i < int'(N_IN); i++) s[h] += real'(int'($signed(W1[h][i]))) / 1000.0 * x[i];
          s[h] = s[h] / real'(2 ** $clog2(N_IN));
          g[h] = (s[h] > 0.0) ? s[h] : -1.0;
          if (s[h] < MARGIN && s[h] > -MARGIN) begin hid_clear = 1'b0; all_clear = 1'b0; end
        end
        for (int o = 0; o < int'(N_OUT); o++) begin
          u[o] = 0.0;
          for (int h = 0; h < int'(N_HID); h++) u[o] += real'(int'($signed(W2[o][h]))) / 1000.0 * g[h];
          u[o] = u[o] / real'(2 ** $clog2(N_HID));
          ones[o] = 0;
          if (u[o] < MARGIN && u[o] > -MARGIN) all_clear = 1'b0;
        end
        if (all_clear || (tries >= 1000 && hid_clear)) break;
      end
      @(negedge clk); start = 1'b1; @(negedge clk); start = 1'b0;
      cycles = 1;
      while (!done) begin
        if (y_valid) for (int o = 0; o < int'(N_OUT); o++) ones[o] += int'(y_bits[o]);
        @(negedge clk);
        cycles++;
      end
      chk(cycles == int'(3 * L + 2), "latency");
      for (int h = 0; h < int'(N_HID); h++) begin
        if (s[h] < MARGIN && s[h] > -MARGIN) continue;
        chk(h_active[h] == (s[h] > 0.0), "hidden decision");
        if (s[h] > 0.0) n_hid_pass++; else n_hid_block++;
      end
      if (!hid_clear) continue;
      checked_runs++;
      for (int o = 0; o < int'(N_OUT); o++) begin
        if (u[o] < MARGIN && u[o] > -MARGIN) continue;
        expect_ones = (u[o] > 0.0) ? real'(L) * (u[o] + 1.0) / 2.0 : 0.0;
        chk(y_active[o] == (u[o] > 0.0), "output decision");
        chk(real'(ones[o]) > expect_ones - 0.07 * real'(L) && real'(ones[o]) < expect_ones + 0.07 * real'(L),
            $sformatf("output %0d ones %0d, expected about %0d", o, ones[o], int'(expect_ones)));
        if (u[o] > 0.0) n_out_pass++; else n_out_block++;
      end
    end
    finished = 1'b1;
  end
endmodule
