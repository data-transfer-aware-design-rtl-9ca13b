// hmp_top: FPGA side of the heterogeneous multicore platform.
//
// A hard CPU core streams image data over one AXI bus into N_C custom
// accelerator cores, starts them, and collects their results. Each core
// processes N_W windows in parallel (window parallelism W_P = N_C * N_W) with
// P_P pixels of a window per cycle. Because transfers on the single bus
// cannot overlap each other but can overlap computation on other cores,
// the CPU can load core 2 while core 1 computes: choosing N_C, N_W and P_P
// well hides most of the transfer time. The default parameters are the
// optimum found for a 16x16 filter on a 640x480 image: 4 cores x 4 windows,
// P_P = 1, partial images 94 pixels wide.
//
// Structure: axil_slave (AXI4-Lite port) -> acc_interconnect (core decode) ->
// N_C x accel_core. Byte address layout:
//   addr[1:0] byte, then OFFW word-offset bits, 2 region bits, core number.
// done_o/busy_o bring out every core's status for interrupts or polling.
// One clock drives the bus and the cores (the document's accelerator runs
// at 100 MHz); a common clock is this design's choice.
module hmp_top
  import acc_pkg::*;
#(
  parameter int unsigned N_C    = 4,
  parameter int unsigned N_W    = 4,
  parameter int unsigned P_P    = 1,
  parameter int unsigned W_H    = 16,
  parameter int unsigned W_W    = 16,
  parameter int unsigned P_W    = 94,
  parameter int unsigned B_CA   = 8,
  parameter int unsigned B_AC   = 16,
  parameter int unsigned ADDR_W = 32
)(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] s_awaddr,
  input  logic              s_awvalid,
  output logic              s_awready,
  input  logic [BUS_W-1:0]  s_wdata,
  input  logic [3:0]        s_wstrb,
  input  logic              s_wvalid,
  output logic              s_wready,
  output logic [1:0]        s_bresp,
  output logic              s_bvalid,
  input  logic              s_bready,
  input  logic [ADDR_W-1:0] s_araddr,
  input  logic              s_arvalid,
  output logic              s_arready,
  output logic [BUS_W-1:0]  s_rdata,
  output logic [1:0]        s_rresp,
  output logic              s_rvalid,
  input  logic              s_rready,
  output logic [N_C-1:0]    done_o,
  output logic [N_C-1:0]    busy_o
);

  localparam int unsigned OFFW = core_off_w(N_W, P_P, W_H, W_W, P_W, B_CA, B_AC);

  sbus_req_t        bus_req;
  logic [BUS_W-1:0] bus_rdata;
  sbus_req_t        core_req   [N_C];
  logic [BUS_W-1:0] core_rdata [N_C];

  axil_slave #(.ADDR_W(ADDR_W)) u_axi (
    .clk, .rst_n,
    .s_awaddr, .s_awvalid, .s_awready,
    .s_wdata, .s_wstrb, .s_wvalid, .s_wready,
    .s_bresp, .s_bvalid, .s_bready,
    .s_araddr, .s_arvalid, .s_arready,
    .s_rdata, .s_rresp, .s_rvalid, .s_rready,
    .req_o   (bus_req),
    .rdata_i (bus_rdata)
  );

  acc_interconnect #(.N_C(N_C), .OFFW(OFFW)) u_ic (
    .clk, .rst_n,
    .req_i   (bus_req),
    .rdata_o (bus_rdata),
    .req_o   (core_req),
    .rdata_i (core_rdata)
  );

  for (genvar i = 0; i < N_C; i++) begin : g_core
    accel_core #(
      .N_W(N_W), .P_P(P_P), .W_H(W_H), .W_W(W_W), .P_W(P_W), .B_CA(B_CA), .B_AC(B_AC)
    ) u_core (
      .clk, .rst_n,
      .bus   (core_req[i]),
      .rdata (core_rdata[i]),
      .busy  (busy_o[i]),
      .done  (done_o[i])
    );
  end

endmodule
