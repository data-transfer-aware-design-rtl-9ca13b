// tb_hmp_top_full: the platform at its default (full) size processing one
// complete batch: 4 cores x 4 windows = 16 partial images of 94 x 248 pixels
// with a 16x16 filter, P_P = 1, i.e. 233 sequences per core. This is the
// optimal configuration for a 16x16 filter on a VGA image; the whole
// 640x480 image is this batch repeated. Every result is checked by the CPU
// model; computation is long against the transfers, so the cores hide each
// other's transfers (case A2). The measured batch time must agree with the
// processing-time model (Eqs. (6)-(15)) to within 1 %.
module tb_hmp_top_full;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [31:0] awaddr, wdata, araddr, rdata;
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [3:0] wstrb;
  logic [1:0] bresp, rresp;
  logic [3:0] done, busy;
  int checks, failures;
  logic fin;

  hmp_top dut (
    .clk, .rst_n,
    .s_awaddr(awaddr), .s_awvalid(awvalid), .s_awready(awready),
    .s_wdata(wdata), .s_wstrb(wstrb), .s_wvalid(wvalid), .s_wready(wready),
    .s_bresp(bresp), .s_bvalid(bvalid), .s_bready(bready),
    .s_araddr(araddr), .s_arvalid(arvalid), .s_arready(arready),
    .s_rdata(rdata), .s_rresp(rresp), .s_rvalid(rvalid), .s_rready(rready),
    .done_o(done), .busy_o(busy)
  );

  hmp_cpu_model #(.N_C(4), .N_W(4), .P_P(1), .W_H(16), .W_W(16), .P_W(94), .P_H(248),
                  .NEED_A1(0), .NEED_A2(1), .MODEL_TOL(0.01)) cpu (
    .clk, .rst_n,
    .awaddr, .awvalid, .awready, .wdata, .wstrb, .wvalid, .wready,
    .bresp, .bvalid, .bready, .araddr, .arvalid, .arready,
    .rdata, .rresp, .rvalid, .rready,
    .busy_i(busy), .done_i(done),
    .checks, .failures, .finished(fin)
  );

  initial begin
    repeat (8000000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (fin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
