// hmp_workload_run: one platform instance, built with the given parameters,
// driven by the CPU model through its AXI port. Used by testbenches that run
// several configurations side by side; the timing model must match the
// measured batch time to within 10 %.
module hmp_workload_run #(
  parameter int unsigned N_C = 2,
  parameter int unsigned N_W = 2,
  parameter int unsigned P_P = 1,
  parameter int unsigned W_H = 4,
  parameter int unsigned W_W = 4,
  parameter int unsigned P_W = 8,
  parameter int unsigned P_H = 6
)(
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished
);
  logic [31:0] awaddr, wdata, araddr, rdata;
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [3:0] wstrb;
  logic [1:0] bresp, rresp;
  logic [N_C-1:0] done, busy;

  hmp_top #(.N_C(N_C), .N_W(N_W), .P_P(P_P), .W_H(W_H), .W_W(W_W), .P_W(P_W)) dut (
    .clk, .rst_n,
    .s_awaddr(awaddr), .s_awvalid(awvalid), .s_awready(awready),
    .s_wdata(wdata), .s_wstrb(wstrb), .s_wvalid(wvalid), .s_wready(wready),
    .s_bresp(bresp), .s_bvalid(bvalid), .s_bready(bready),
    .s_araddr(araddr), .s_arvalid(arvalid), .s_arready(arready),
    .s_rdata(rdata), .s_rresp(rresp), .s_rvalid(rvalid), .s_rready(rready),
    .done_o(done), .busy_o(busy)
  );

  hmp_cpu_model #(.N_C(N_C), .N_W(N_W), .P_P(P_P), .W_H(W_H), .W_W(W_W), .P_W(P_W),
                  .P_H(P_H), .NEED_A1(0), .NEED_A2(0), .MODEL_TOL(0.10)) cpu (
    .clk, .rst_n,
    .awaddr, .awvalid, .awready, .wdata, .wstrb, .wvalid, .wready,
    .bresp, .bvalid, .bready, .araddr, .arvalid, .arready,
    .rdata, .rresp, .rvalid, .rready,
    .busy_i(busy), .done_i(done),
    .checks, .failures, .finished
  );
endmodule
