// tb_filter_workloads: the filter workloads of the evaluation, each on the
// platform built with the optimised parameters reported for it, side by side:
//   8x8   max parallelism 16: W_P 16, P_P 1, N_C 2, N_W 8,  P_W 166
//   12x12 max parallelism 16: W_P 16, P_P 1, N_C 4, N_W 4,  P_W 169
//   24x24 max parallelism 16: W_P 16, P_P 1, N_C 8, N_W 2,  P_W 62
//   15x15 max parallelism 32: W_P 32, P_P 1, N_C 2, N_W 16, P_W 93
//   16x16 max parallelism 64: W_P 16, P_P 2, N_C 4, N_W 4,  P_W 172
//   18x18 max parallelism 64: W_P 16, P_P 2, N_C 4, N_W 4,  P_W 173
// Full scan-area widths are simulated, but each partial image is cut to
// W_H + 2 rows (3 sequences) to bound simulation time; every result of
// every sequence is checked. With so few sequences the start and end of
// the schedule weigh heavily, so the processing-time model is only required
// to match the measured time to within 10 % here.
module tb_filter_workloads;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int N = 6;
  int   checks [N], failures [N];
  logic fin [N];

  hmp_workload_run #(.N_C(2), .N_W(8),  .P_P(1), .W_H(8),  .W_W(8),  .P_W(166), .P_H(10)) w8  (.clk, .rst_n, .checks(checks[0]), .failures(failures[0]), .finished(fin[0]));
  hmp_workload_run #(.N_C(4), .N_W(4),  .P_P(1), .W_H(12), .W_W(12), .P_W(169), .P_H(14)) w12 (.clk, .rst_n, .checks(checks[1]), .failures(failures[1]), .finished(fin[1]));
  hmp_workload_run #(.N_C(8), .N_W(2),  .P_P(1), .W_H(24), .W_W(24), .P_W(62),  .P_H(26)) w24 (.clk, .rst_n, .checks(checks[2]), .failures(failures[2]), .finished(fin[2]));
  hmp_workload_run #(.N_C(2), .N_W(16), .P_P(1), .W_H(15), .W_W(15), .P_W(93),  .P_H(17)) w15 (.clk, .rst_n, .checks(checks[3]), .failures(failures[3]), .finished(fin[3]));
  hmp_workload_run #(.N_C(4), .N_W(4),  .P_P(2), .W_H(16), .W_W(16), .P_W(172), .P_H(18)) w16 (.clk, .rst_n, .checks(checks[4]), .failures(failures[4]), .finished(fin[4]));
  hmp_workload_run #(.N_C(4), .N_W(4),  .P_P(2), .W_H(18), .W_W(18), .P_W(173), .P_H(20)) w18 (.clk, .rst_n, .checks(checks[5]), .failures(failures[5]), .finished(fin[5]));

  function automatic int sum(int v [N]);
    int s = 0;
    foreach (v[i]) s += v[i];
    return s;
  endfunction

  function automatic bit all_done();
    foreach (fin[i]) if (!fin[i]) return 0;
    return 1;
  endfunction

  initial begin
    repeat (2000000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", sum(checks), sum(failures) + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (!all_done()) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", sum(checks), sum(failures));
    $finish;
  end
endmodule
