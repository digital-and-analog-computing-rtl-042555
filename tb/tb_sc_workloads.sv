// tb_sc_workloads: runs the stochastic network at every other topology of
// the benchmark table alongside the default 9-3-2: 6-3-2, 5-3-2, 4-3-3,
// 8-3-3, 7-3-3, 6-3-3, 21-3-3 and 16-3-10, all with 1024-bit streams. No
// trained weights exist, so each topology gets patterned weights and random
// inputs (see sc_workload_unit, which also holds the expected-value model).
// Counts, over all topologies, how often a hidden and an output activation
// passed and blocked, and fails if any topology had no checked run or any of
// those four never happened.
module tb_sc_workloads;
  localparam int NT = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks, failures;
  int u_checks [NT], u_failures [NT], u_runs [NT];
  int u_hp [NT], u_hb [NT], u_op [NT], u_ob [NT];
  logic [NT-1:0] u_fin;

  always #5 clk = !clk;

  sc_workload_unit #(.N_IN(6),  .N_HID(3), .N_OUT(2),  .SEED(1)) u0 (.clk, .rst_n, .checks(u_checks[0]), .failures(u_failures[0]), .checked_runs(u_runs[0]), .n_hid_pass(u_hp[0]), .n_hid_block(u_hb[0]), .n_out_pass(u_op[0]), .n_out_block(u_ob[0]), .finished(u_fin[0]));
  sc_workload_unit #(.N_IN(5),  .N_HID(3), .N_OUT(2),  .SEED(2)) u1 (.clk, .rst_n, .checks(u_checks[1]), .failures(u_failures[1]), .checked_runs(u_runs[1]), .n_hid_pass(u_hp[1]), .n_hid_block(u_hb[1]), .n_out_pass(u_op[1]), .n_out_block(u_ob[1]), .finished(u_fin[1]));
  sc_workload_unit #(.N_IN(4),  .N_HID(3), .N_OUT(3),  .SEED(3)) u2 (.clk, .rst_n, .checks(u_checks[2]), .failures(u_failures[2]), .checked_runs(u_runs[2]), .n_hid_pass(u_hp[2]), .n_hid_block(u_hb[2]), .n_out_pass(u_op[2]), .n_out_block(u_ob[2]), .finished(u_fin[2]));
  sc_workload_unit #(.N_IN(8),  .N_HID(3), .N_OUT(3),  .SEED(4)) u3 (.clk, .rst_n, .checks(u_checks[3]), .failures(u_failures[3]), .checked_runs(u_runs[3]), .n_hid_pass(u_hp[3]), .n_hid_block(u_hb[3]), .n_out_pass(u_op[3]), .n_out_block(u_ob[3]), .finished(u_fin[3]));
  sc_workload_unit #(.N_IN(7),  .N_HID(3), .N_OUT(3),  .SEED(5)) u4 (.clk, .rst_n, .checks(u_checks[4]), .failures(u_failures[4]), .checked_runs(u_runs[4]), .n_hid_pass(u_hp[4]), .n_hid_block(u_hb[4]), .n_out_pass(u_op[4]), .n_out_block(u_ob[4]), .finished(u_fin[4]));
  sc_workload_unit #(.N_IN(6),  .N_HID(3), .N_OUT(3),  .SEED(6)) u5 (.clk, .rst_n, .checks(u_checks[5]), .failures(u_failures[5]), .checked_runs(u_runs[5]), .n_hid_pass(u_hp[5]), .n_hid_block(u_hb[5]), .n_out_pass(u_op[5]), .n_out_block(u_ob[5]), .finished(u_fin[5]));
  sc_workload_unit #(.N_IN(21), .N_HID(3), .N_OUT(3),  .SEED(7), .MARGIN(0.1)) u6 (.clk, .rst_n, .checks(u_checks[6]), .failures(u_failures[6]), .checked_runs(u_runs[6]), .n_hid_pass(u_hp[6]), .n_hid_block(u_hb[6]), .n_out_pass(u_op[6]), .n_out_block(u_ob[6]), .finished(u_fin[6]));
  sc_workload_unit #(.N_IN(16), .N_HID(3), .N_OUT(10), .SEED(8)) u7 (.clk, .rst_n, .checks(u_checks[7]), .failures(u_failures[7]), .checked_runs(u_runs[7]), .n_hid_pass(u_hp[7]), .n_hid_block(u_hb[7]), .n_out_pass(u_op[7]), .n_out_block(u_ob[7]), .finished(u_fin[7]));

  initial begin
    #2000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    int hp, hb, op, ob;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (&u_fin);
    checks = 0; failures = 0; hp = 0; hb = 0; op = 0; ob = 0;
    for (int t = 0; t < NT; t++) begin
      $display("topology %0d: %0d checked runs, %0d checks, %0d failures", t, u_runs[t], u_checks[t], u_failures[t]);
      checks += u_checks[t] + 1;
      failures += u_failures[t];
      if (u_runs[t] == 0) begin failures++; $display("FAIL topology %0d had no checked run", t); end
      hp += u_hp[t]; hb += u_hb[t]; op += u_op[t]; ob += u_ob[t];
    end
    $display("hidden pass %0d block %0d, output pass %0d block %0d", hp, hb, op, ob);
    checks += 4;
    if (hp == 0) failures++;
    if (hb == 0) failures++;
    if (op == 0) failures++;
    if (ob == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
