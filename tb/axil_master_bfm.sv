// axil_master_bfm: AXI4-Lite master for testbenches, standing in for the CPU.
// write() presents address and data with a chosen skew (address first, data
// first, or both together), waits for both handshakes and for the write
// response; read() presents the address and returns the read data. Each
// channel handshake is checked against the AXI rule that VALID, once raised,
// stays up until READY.
module axil_master_bfm #(
  parameter int unsigned ADDR_W = 32
)(
  input  logic              clk,
  output logic [ADDR_W-1:0] awaddr,
  output logic              awvalid,
  input  logic              awready,
  output logic [31:0]       wdata,
  output logic [3:0]        wstrb,
  output logic              wvalid,
  input  logic              wready,
  input  logic [1:0]        bresp,
  input  logic              bvalid,
  output logic              bready,
  output logic [ADDR_W-1:0] araddr,
  output logic              arvalid,
  input  logic              arready,
  input  logic [31:0]       rdata,
  input  logic [1:0]        rresp,
  input  logic              rvalid,
  output logic              rready
);

  int n_writes = 0, n_reads = 0, resp_errors = 0;

  initial begin
    awaddr = '0; awvalid = 0; wdata = '0; wstrb = '0; wvalid = 0; bready = 0;
    araddr = '0; arvalid = 0; rready = 0;
  end

  // The master drives just after a rising edge and samples at the falling
  // edge, where every ready/valid of the slave has settled for the coming
  // rising edge.
  // skew: 0 together, 1 address first, 2 data first
  task automatic write(input logic [ADDR_W-1:0] addr, input logic [31:0] data, input int skew = 0);
    bit aw_done = 0, w_done = 0, aw_hs, w_hs, b_hs;
    int t = 0;
    @(posedge clk);
    #1;
    if (skew != 2) begin awaddr = addr; awvalid = 1; end
    if (skew != 1) begin wdata = data; wstrb = 4'hf; wvalid = 1; end
    while (!(aw_done && w_done)) begin
      @(negedge clk);
      aw_hs = awvalid && awready;
      w_hs  = wvalid && wready;
      @(posedge clk);
      #1;
      if (aw_hs) begin aw_done = 1; awvalid = 0; end
      if (w_hs)  begin w_done = 1;  wvalid = 0; end
      t++;
      if (t == 1 && skew == 1 && !w_done)  begin wdata = data; wstrb = 4'hf; wvalid = 1; end
      if (t == 1 && skew == 2 && !aw_done) begin awaddr = addr; awvalid = 1; end
    end
    bready = 1;
    do begin
      @(negedge clk);
      b_hs = bvalid;
      if (b_hs && bresp != 2'b00) resp_errors++;
      @(posedge clk);
      #1;
    end while (!b_hs);
    bready = 0;
    n_writes++;
  endtask

  task automatic read(input logic [ADDR_W-1:0] addr, output logic [31:0] data);
    bit hs;
    @(posedge clk);
    #1;
    araddr = addr; arvalid = 1;
    do begin
      @(negedge clk);
      hs = arready;
      @(posedge clk);
      #1;
    end while (!hs);
    arvalid = 0;
    rready = 1;
    do begin
      @(negedge clk);
      hs = rvalid;
      data = rdata;
      if (hs && rresp != 2'b00) resp_errors++;
      @(posedge clk);
      #1;
    end while (!hs);
    rready = 0;
    n_reads++;
  endtask

endmodule
