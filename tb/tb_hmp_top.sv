// tb_hmp_top: end-to-end test of the platform in two reduced configurations
// side by side, each driven by the CPU model through the AXI port:
//   a: 2 cores x 3 windows, P_P = 2, 4x3 filter, 8-pixel-wide partial images,
//      10 rows. Computation is short against the transfers, so cores wait
//      for the bus (case A1 of the overlap model).
//   b: 3 cores x 2 windows, P_P = 1, 8x8 filter, 12-pixel-wide partial
//      images, 20 rows. Computation is long, so the CPU waits for the cores
//      and their computation hides the other cores' transfers (case A2).
// Every window result of every sequence is checked, and each mechanism
// (first/next-sequence start, row-pointer wrap, overlapped transfers, pause,
// both overlap cases) must occur. The measured time of each batch must
// agree with the processing-time model to within 5 %.
module tb_hmp_top;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks_a, failures_a, checks_b, failures_b;
  logic fin_a, fin_b;

  initial begin
    repeat (400000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b, failures_a + failures_b + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (fin_a && fin_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b, failures_a + failures_b);
    $finish;
  end

  `define HMP_PAIR(SFX, NC, NW, PP, WH, WW, PW, PH, A1, A2)                          \
    logic [31:0] awaddr_``SFX, wdata_``SFX, araddr_``SFX, rdata_``SFX;                \
    logic awvalid_``SFX, awready_``SFX, wvalid_``SFX, wready_``SFX;                   \
    logic bvalid_``SFX, bready_``SFX, arvalid_``SFX, arready_``SFX;                   \
    logic rvalid_``SFX, rready_``SFX;                                                 \
    logic [3:0] wstrb_``SFX;                                                          \
    logic [1:0] bresp_``SFX, rresp_``SFX;                                             \
    logic [NC-1:0] done_``SFX, busy_``SFX;                                            \
    hmp_top #(.N_C(NC), .N_W(NW), .P_P(PP), .W_H(WH), .W_W(WW), .P_W(PW)) dut_``SFX ( \
      .clk, .rst_n,                                                                   \
      .s_awaddr(awaddr_``SFX), .s_awvalid(awvalid_``SFX), .s_awready(awready_``SFX),  \
      .s_wdata(wdata_``SFX), .s_wstrb(wstrb_``SFX), .s_wvalid(wvalid_``SFX),          \
      .s_wready(wready_``SFX), .s_bresp(bresp_``SFX), .s_bvalid(bvalid_``SFX),        \
      .s_bready(bready_``SFX), .s_araddr(araddr_``SFX), .s_arvalid(arvalid_``SFX),    \
      .s_arready(arready_``SFX), .s_rdata(rdata_``SFX), .s_rresp(rresp_``SFX),        \
      .s_rvalid(rvalid_``SFX), .s_rready(rready_``SFX),                               \
      .done_o(done_``SFX), .busy_o(busy_``SFX));                                      \
    hmp_cpu_model #(.N_C(NC), .N_W(NW), .P_P(PP), .W_H(WH), .W_W(WW), .P_W(PW),       \
                    .P_H(PH), .NEED_A1(A1), .NEED_A2(A2), .MODEL_TOL(0.05)) cpu_``SFX (\
      .clk, .rst_n,                                                                   \
      .awaddr(awaddr_``SFX), .awvalid(awvalid_``SFX), .awready(awready_``SFX),        \
      .wdata(wdata_``SFX), .wstrb(wstrb_``SFX), .wvalid(wvalid_``SFX),                \
      .wready(wready_``SFX), .bresp(bresp_``SFX), .bvalid(bvalid_``SFX),              \
      .bready(bready_``SFX), .araddr(araddr_``SFX), .arvalid(arvalid_``SFX),          \
      .arready(arready_``SFX), .rdata(rdata_``SFX), .rresp(rresp_``SFX),              \
      .rvalid(rvalid_``SFX), .rready(rready_``SFX),                                   \
      .busy_i(busy_``SFX), .done_i(done_``SFX),                                       \
      .checks(checks_``SFX), .failures(failures_``SFX), .finished(fin_``SFX));

  `HMP_PAIR(a, 2, 3, 2, 4, 3, 8, 10, 1, 0)
  `HMP_PAIR(b, 3, 2, 1, 8, 8, 12, 20, 0, 1)

endmodule
