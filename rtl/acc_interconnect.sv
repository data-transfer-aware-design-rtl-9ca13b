// acc_interconnect: routes the single CPU bus to N_C accelerator cores.
//
// There is one bus, so at most one core is accessed in any cycle and data
// transfers to different cores are serialised, as the processing schedule
// requires. The core number is the word-address field just above the
// core's window (OFFW offset bits plus two region bits); higher address bits
// are ignored. A request is forwarded only to the selected core, with the
// address reduced to the core-local offset. Read data come back one cycle
// after the request from the core selected then; a core number without a
// core reads as zero and writes to it are dropped.
// Ports: req_i/rdata_o towards the bus slave, req_o[i]/rdata_i[i] per core.
// The decoding scheme is this design's choice.
module acc_interconnect
  import acc_pkg::*;
#(
  parameter int unsigned N_C  = 4,
  parameter int unsigned OFFW = 11
)(
  input  logic             clk,
  input  logic             rst_n,
  input  sbus_req_t        req_i,
  output logic [BUS_W-1:0] rdata_o,
  output sbus_req_t        req_o   [N_C],
  input  logic [BUS_W-1:0] rdata_i [N_C]
);

  localparam int unsigned LW = OFFW + 2;

  logic [31:0] sel, sel_q;
  logic        ok_q;

  assign sel = req_i.addr >> LW;

  always_comb begin
    for (int i = 0; i < N_C; i++) begin
      req_o[i]      = req_i;
      req_o[i].req  = req_i.req && (sel == i);
      req_o[i].addr = req_i.addr & ((32'd1 << LW) - 1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_q <= '0;
      ok_q  <= 1'b0;
    end else if (req_i.req && !req_i.we) begin
      sel_q <= sel;
      ok_q  <= sel < N_C;
    end
  end

  always_comb begin
    rdata_o = '0;
    for (int i = 0; i < N_C; i++)
      if (ok_q && sel_q == i) rdata_o = rdata_i[i];
  end

  // One bus: never more than one core receives a request.
  logic [N_C-1:0] reqs;
  for (genvar i = 0; i < N_C; i++) begin : g_reqs
    assign reqs[i] = req_o[i].req;
  end
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(reqs));

endmodule
