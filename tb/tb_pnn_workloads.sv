// tb_pnn_workloads: runs the printed analog network at every topology of its
// benchmark table: 4-4-3-3 (default), 6-4-3-2, 9-4-3-2, 8-4-3-3, 5-4-3-2,
// 7-4-3-3 and 6-4-3-3, each on 20 random input vectors, and checks every
// output voltage against the reference model in pnn_workload_unit. Fails if
// a topology checked nothing, or if no output class 0 or 1 ever won over
// all topologies (the network would then not be steering anything).
module tb_pnn_workloads;
  localparam int NT = 7;
  int u_checks [NT], u_failures [NT];
  int u_cls [NT][3];
  logic [NT-1:0] u_fin;

  pnn_workload_unit #(.N_IN(4), .N_OUT(3), .SEED(0)) u0 (.checks(u_checks[0]), .failures(u_failures[0]), .n_class(u_cls[0]), .finished(u_fin[0]));
  pnn_workload_unit #(.N_IN(6), .N_OUT(2), .SEED(1)) u1 (.checks(u_checks[1]), .failures(u_failures[1]), .n_class(u_cls[1]), .finished(u_fin[1]));
  pnn_workload_unit #(.N_IN(9), .N_OUT(2), .SEED(2)) u2 (.checks(u_checks[2]), .failures(u_failures[2]), .n_class(u_cls[2]), .finished(u_fin[2]));
  pnn_workload_unit #(.N_IN(8), .N_OUT(3), .SEED(3)) u3 (.checks(u_checks[3]), .failures(u_failures[3]), .n_class(u_cls[3]), .finished(u_fin[3]));
  pnn_workload_unit #(.N_IN(5), .N_OUT(2), .SEED(4)) u4 (.checks(u_checks[4]), .failures(u_failures[4]), .n_class(u_cls[4]), .finished(u_fin[4]));
  pnn_workload_unit #(.N_IN(7), .N_OUT(3), .SEED(5)) u5 (.checks(u_checks[5]), .failures(u_failures[5]), .n_class(u_cls[5]), .finished(u_fin[5]));
  pnn_workload_unit #(.N_IN(6), .N_OUT(3), .SEED(6)) u6 (.checks(u_checks[6]), .failures(u_failures[6]), .n_class(u_cls[6]), .finished(u_fin[6]));

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    int checks, failures;
    int wins [3];
    wait (&u_fin);
    checks = 0; failures = 0; wins = '{0, 0, 0};
    for (int t = 0; t < NT; t++) begin
      $display("topology %0d: %0d checks, %0d failures, class wins %0d/%0d/%0d", t, u_checks[t], u_failures[t],
               u_cls[t][0], u_cls[t][1], u_cls[t][2]);
      checks += u_checks[t] + 1;
      failures += u_failures[t];
      if (u_checks[t] == 0) failures++;
      for (int k = 0; k < 3; k++) wins[k] += u_cls[t][k];
    end
    checks += 2;
    if (wins[0] == 0) failures++;
    if (wins[1] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
