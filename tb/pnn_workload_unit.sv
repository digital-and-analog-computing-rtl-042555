// pnn_workload_unit: test harness that runs one printed analog network
// topology (pnn with N_IN-4-3-N_OUT) on RUNS random input vectors and checks
// every output voltage against a reference model written out here:
//   w_i = |S_i| / (sum_j |S_j| + |S_B| + S_D),  w_b = |S_B| / (same)
//   inv(v) = -(0.072 + 0.82 tanh((v - 0.062) 5.52))
//   ptanh(v) = 0.046 + tanh((v - 0.054) 9.11)
//   y = ptanh(sum_i w_i (S_i < 0 ? inv(x_i) : x_i) + w_b * 1 V)
// Conductances follow a fixed pattern (+-5..20 uS, chosen by SEED) since no
// trained values exist; inputs are uniform in [-1 V, 1 V]. Counts how often
// each output class won and how often a negative weight was in play.
// Results leave through ports; finished goes high after the last run.
module pnn_workload_unit #(
  parameter int unsigned N_IN  = 4,
  parameter int unsigned N_OUT = 3,
  parameter int unsigned SEED  = 0,
  parameter int unsigned RUNS  = 20
) (
  output int   checks,
  output int   failures,
  output int   n_class [3],
  output logic finished
);
  localparam int unsigned N_H1 = 4;
  localparam int unsigned N_H2 = 3;
  localparam int SB  = 2000;
  localparam int S_D = 10000;

  typedef logic signed [N_H1-1:0][N_IN-1:0][31:0] s1_t;
  typedef logic signed [N_H2-1:0][N_H1-1:0][31:0] s2_t;
  typedef logic signed [N_OUT-1:0][N_H2-1:0][31:0] s3_t;

  function automatic int cond(input int unsigned a, input int unsigned b);
    int k;
    k = int'((a * 5 + b * 3 + SEED) % 6);
    return (k == 0) ? -20000 : (k == 1) ? -10000 : (k == 2) ? -5000 : (k == 3) ? 5000 : (k == 4) ? 10000 : 20000;
  endfunction

  function automatic s1_t mk_s1();
    s1_t s;
    for (int unsigned n = 0; n < N_H1; n++) for (int unsigned i = 0; i < N_IN; i++) s[n][i] = 32'(cond(n, i));
    return s;
  endfunction
  function automatic s2_t mk_s2();
    s2_t s;
    for (int unsigned n = 0; n < N_H2; n++) for (int unsigned i = 0; i < N_H1; i++) s[n][i] = 32'(cond(n + 7, i + 1));
    return s;
  endfunction
  function automatic s3_t mk_s3();
    s3_t s;
    for (int unsigned n = 0; n < N_OUT; n++) for (int unsigned i = 0; i < N_H2; i++) s[n][i] = 32'(cond(n + 3, i + 4));
    return s;
  endfunction

  localparam s1_t S1 = mk_s1();
  localparam s2_t S2 = mk_s2();
  localparam s3_t S3 = mk_s3();
  localparam logic signed [N_H1-1:0][31:0]  SB1 = {N_H1{32'(SB)}};
  localparam logic signed [N_H2-1:0][31:0]  SB2 = {N_H2{32'(SB)}};
  localparam logic signed [N_OUT-1:0][31:0] SB3 = {N_OUT{32'(SB)}};

  real x [N_IN];
  real y [N_OUT];

  pnn #(.N_IN(N_IN), .N_H1(N_H1), .N_H2(N_H2), .N_OUT(N_OUT),
        .S1(S1), .SB1(SB1), .S2(S2), .SB2(SB2), .S3(S3), .SB3(SB3), .S_D(S_D)) u_net (.x, .y);

  function automatic real ref_neuron(input real v [21], input int s [21], input int n);
    real gs, acc, vi;
    gs = real'(SB + S_D);
    acc = real'(SB) * 1.0;
    for (int i = 0; i < n; i++) begin
      gs += (s[i] < 0) ? real'(-s[i]) : real'(s[i]);
      vi = (s[i] < 0) ? -(0.072 + 0.82 * $tanh((v[i] - 0.062) * 5.52)) : v[i];
      acc += ((s[i] < 0) ? real'(-s[i]) : real'(s[i])) * vi;
    end
    return 0.046 + $tanh((acc / gs - 0.054) * 9.11);
  endfunction

  initial begin
    real v [21];
    int s [21];
    real r1 [N_H1];
    real r2 [N_H2];
    real r3 [N_OUT];
    int best;
    checks = 0; failures = 0; finished = 1'b0;
    for (int k = 0; k < 3; k++) n_class[k] = 0;
    for (int i = 0; i < int'(N_IN); i++) x[i] = 0.0;
    #10;
    for (int run = 0; run < int'(RUNS); run++) begin
      for (int i = 0; i < int'(N_IN); i++) x[i] = real'(int'($urandom % 201) - 100) / 100.0;
      #1;
      for (int n = 0; n < int'(N_H1); n++) begin
        for (int i = 0; i < int'(N_IN); i++) begin v[i] = x[i]; s[i] = cond(n, i); end
        r1[n] = ref_neuron(v, s, N_IN);
      end
      for (int n = 0; n < int'(N_H2); n++) begin
        for (int i = 0; i < int'(N_H1); i++) begin v[i] = r1[i]; s[i] = cond(n + 7, i + 1); end
        r2[n] = ref_neuron(v, s, N_H1);
      end
      best = 0;
      for (int n = 0; n < int'(N_OUT); n++) begin
        for (int i = 0; i < int'(N_H2); i++) begin v[i] = r2[i]; s[i] = cond(n + 3, i + 4); end
        r3[n] = ref_neuron(v, s, N_H2);
        checks++;
        if (y[n] > r3[n] + 1.0e-9 || y[n] < r3[n] - 1.0e-9) begin
          failures++;
          $display("FAIL %0d-4-3-%0d run %0d output %0d: %f, expected %f", N_IN, N_OUT, run, n, y[n], r3[n]);
        end
        if (r3[n] > r3[best]) best = n;
      end
      if (best < 3) n_class[best]++;
    end
    finished = 1'b1;
  end
endmodule
