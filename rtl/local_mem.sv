// local_mem: dual-port local memory module of an accelerator core.
//
// Port A faces the CPU bus (transfers in and out), port B faces the
// accelerator data path (AGU-addressed reads, or result writes from the
// rightmost PE column). Both ports read synchronously: data appear the cycle
// after an enabled read. If both ports write one address in the same cycle,
// port B wins. The memory is written as an array so that FPGA tools map it
// to block RAM.
// The document names local memory modules and gives their capacity (a scan
// area, W_H x P_W words per window); the two-port organisation and read
// latency are this design's choices.
module local_mem #(
  parameter int unsigned DW    = 8,
  parameter int unsigned DEPTH = 1504,
  localparam int unsigned AW   = (DEPTH <= 1) ? 1 : $clog2(DEPTH)
)(
  input  logic          clk,
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [DW-1:0] a_wdata,
  output logic [DW-1:0] a_rdata,
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [DW-1:0] b_wdata,
  output logic [DW-1:0] b_rdata
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en && a_we && 32'(a_addr) < DEPTH) mem[a_addr] <= a_wdata;
    if (b_en && b_we && 32'(b_addr) < DEPTH) mem[b_addr] <= b_wdata;
  end

  always_ff @(posedge clk) begin
    if (a_en) a_rdata <= (32'(a_addr) < DEPTH) ? mem[a_addr] : '0;
    if (b_en) b_rdata <= (32'(b_addr) < DEPTH) ? mem[b_addr] : '0;
  end

endmodule
