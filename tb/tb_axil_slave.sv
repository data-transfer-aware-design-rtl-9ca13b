// tb_axil_slave: self-checking test of the AXI4-Lite slave bridge.
// Behind the bridge sits a small word-addressed register file answering the
// internal bus with one-cycle read latency. Random writes (address first,
// data first or both together) and reads are issued through an AXI master
// model; the test checks every internal request (word address = byte
// address / 4, data, one cycle long), that reads return the stored words,
// that a read behind a held write is served only after it, and that all
// responses are OKAY.
module tb_axil_slave;
  import acc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [31:0] s_awaddr, s_wdata, s_araddr, s_rdata;
  logic s_awvalid, s_awready, s_wvalid, s_wready, s_bvalid, s_bready;
  logic s_arvalid, s_arready, s_rvalid, s_rready;
  logic [3:0] s_wstrb;
  logic [1:0] s_bresp, s_rresp;
  sbus_req_t req_o;
  logic [31:0] rdata_i;
  int checks = 0, failures = 0;

  axil_slave #(.ADDR_W(32)) dut (.*);

  axil_master_bfm #(.ADDR_W(32)) cpu (
    .clk, .awaddr(s_awaddr), .awvalid(s_awvalid), .awready(s_awready),
    .wdata(s_wdata), .wstrb(s_wstrb), .wvalid(s_wvalid), .wready(s_wready),
    .bresp(s_bresp), .bvalid(s_bvalid), .bready(s_bready),
    .araddr(s_araddr), .arvalid(s_arvalid), .arready(s_arready),
    .rdata(s_rdata), .rresp(s_rresp), .rvalid(s_rvalid), .rready(s_rready)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // register file behind the internal bus
  logic [31:0] regs [64];
  int          n_req = 0, last_req_cyc = -5, cyc = 0;
  logic [31:0] exp_addr, exp_data;
  bit          exp_we;

  always @(posedge clk) begin
    cyc++;
    if (rst_n && req_o.req) begin
      checks++;
      if (req_o.addr != exp_addr || req_o.we != exp_we || (exp_we && req_o.wdata != exp_data)) begin
        failures++;
        $display("FAIL request addr %h/%h we %0d/%0d data %h/%h", req_o.addr, exp_addr,
                 req_o.we, exp_we, req_o.wdata, exp_data);
      end
      checks++;
      if (cyc == last_req_cyc + 1) begin failures++; $display("FAIL request longer than a cycle"); end
      last_req_cyc = cyc;
      n_req++;
      if (req_o.we) regs[req_o.addr[5:0]] <= req_o.wdata;
      else          rdata_i <= regs[req_o.addr[5:0]];
    end else rdata_i <= 32'hdead_beef;
  end

  logic [31:0] model [64];

  initial begin
    logic [31:0] d;
    for (int i = 0; i < 64; i++) begin regs[i] = '0; model[i] = '0; end
    rdata_i = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 300; i++) begin
      int w;
      w = $urandom_range(0, 63);
      if ($urandom_range(0, 1)) begin
        d = $urandom;
        exp_addr = 32'(w); exp_we = 1; exp_data = d;
        cpu.write(32'(w) << 2, d, $urandom_range(0, 2));
        model[w] = d;
      end else begin
        exp_addr = 32'(w); exp_we = 0;
        cpu.read(32'(w) << 2, d);
        checks++;
        if (d != model[w]) begin failures++; $display("FAIL read %0d: %h/%h", w, d, model[w]); end
      end
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    checks++;
    if (n_req != 300) begin failures++; $display("FAIL %0d requests", n_req); end
    checks++;
    if (cpu.resp_errors != 0) begin failures++; $display("FAIL error responses"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
