// axil_slave: AXI4-Lite slave port through which the CPU reaches the
// accelerator cores.
//
// The CPU moves pixels, coefficients, commands and results with single-word
// bus transfers. This bridge accepts one AXI4-Lite transaction at a time and
// turns it into a one-cycle request on the internal bus (req_o, word
// address = byte address >> 2), whose read data arrive on rdata_i one cycle
// later. Write address and write data may arrive in either order or
// together; a write is issued once both are held. When a write and a read are
// both ready, the write goes first. Responses are always OKAY; byte strobes
// are not supported and every write updates the whole word (wstrb is
// ignored).
// Sequence of a write: AW/W accepted -> request (1 cycle) -> B valid until
// bready. Read: AR accepted -> request (1 cycle) -> data capture (1 cycle)
// -> R valid until rready.
// The document connects the accelerators to the CPU over AXI; one outstanding
// transaction and the internal bus are this design's choices.
module axil_slave
  import acc_pkg::*;
#(
  parameter int unsigned ADDR_W = 32
)(
  input  logic              clk,
  input  logic              rst_n,
  // AXI4-Lite slave
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
  // internal bus
  output sbus_req_t         req_o,
  input  logic [BUS_W-1:0]  rdata_i
);

  typedef enum logic [2:0] {S_IDLE, S_WREQ, S_BRESP, S_RREQ, S_RDATA, S_RRESP} state_e;
  state_e state;

  logic              aw_full, w_full;
  logic [ADDR_W-1:0] aw_q, ar_q;
  logic [BUS_W-1:0]  w_q;

  assign s_awready = !aw_full;
  assign s_wready  = !w_full;
  assign s_arready = (state == S_IDLE) && !(aw_full && w_full);
  assign s_bvalid  = (state == S_BRESP);
  assign s_bresp   = 2'b00;
  assign s_rvalid  = (state == S_RRESP);
  assign s_rresp   = 2'b00;

  always_comb begin
    req_o       = '0;
    req_o.addr  = 32'((state == S_WREQ ? aw_q : ar_q) >> 2);
    req_o.wdata = w_q;
    req_o.req   = (state == S_WREQ) || (state == S_RREQ);
    req_o.we    = (state == S_WREQ);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      aw_full <= 1'b0;
      w_full  <= 1'b0;
      aw_q    <= '0;
      ar_q    <= '0;
      w_q     <= '0;
      s_rdata <= '0;
    end else begin
      if (s_awvalid && s_awready) begin
        aw_q    <= s_awaddr;
        aw_full <= 1'b1;
      end
      if (s_wvalid && s_wready) begin
        w_q    <= s_wdata;
        w_full <= 1'b1;
      end
      unique case (state)
        S_IDLE:
          if (aw_full && w_full)              state <= S_WREQ;
          else if (s_arvalid && s_arready) begin
            ar_q  <= s_araddr;
            state <= S_RREQ;
          end
        S_WREQ:  state <= S_BRESP;
        S_BRESP: if (s_bready) begin
          aw_full <= 1'b0;
          w_full  <= 1'b0;
          state   <= S_IDLE;
        end
        S_RREQ:  state <= S_RDATA;
        S_RDATA: begin
          s_rdata <= rdata_i;
          state   <= S_RRESP;
        end
        S_RRESP: if (s_rready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // AXI rule: a valid response is held, unchanged, until it is accepted.
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                  s_bvalid && !s_bready |=> s_bvalid);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                  s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata));

  logic unused_strb;
  assign unused_strb = ^s_wstrb;

endmodule
