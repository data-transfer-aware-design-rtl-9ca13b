// tb_acc_interconnect: self-checking test of the core address decoder.
// Three cores with a 4-bit core offset (6-bit core window). Each core is a
// small register model that answers reads one cycle later. Random accesses,
// including addresses of a core that does not exist, check that exactly the
// addressed core sees the request, with the core-local address, that read
// data come back from that core, and that a missing core reads as zero.
module tb_acc_interconnect;
  import acc_pkg::*;

  localparam int unsigned N_C = 3, OFFW = 4, LW = OFFW + 2;

  logic clk = 0, rst_n = 0;
  sbus_req_t req_i;
  logic [31:0] rdata_o;
  sbus_req_t req_o [N_C];
  logic [31:0] rdata_i [N_C];
  int checks = 0, failures = 0;

  acc_interconnect #(.N_C(N_C), .OFFW(OFFW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] mem [N_C][1 << LW];

  for (genvar i = 0; i < N_C; i++) begin : g_core
    always @(posedge clk) begin
      if (req_o[i].req) begin
        if (req_o[i].we) mem[i][req_o[i].addr[LW-1:0]] <= req_o[i].wdata;
        else             rdata_i[i] <= mem[i][req_o[i].addr[LW-1:0]];
      end
    end
  end

  logic [31:0] model [N_C][1 << LW];

  initial begin
    for (int i = 0; i < N_C; i++) begin
      rdata_i[i] = '0;
      for (int j = 0; j < (1 << LW); j++) begin mem[i][j] = '0; model[i][j] = '0; end
    end
    req_i = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      int core, off;
      bit we;
      core = $urandom_range(0, N_C);   // N_C: no such core
      off  = $urandom_range(0, (1 << LW) - 1);
      we   = 1'($urandom_range(0, 1));
      req_i = '0;
      req_i.req = 1; req_i.we = we;
      req_i.addr = 32'((core << LW) | off);
      req_i.wdata = $urandom;
      #1;
      for (int i = 0; i < N_C; i++) begin
        checks++;
        if (req_o[i].req != (i == core)) begin failures++; $display("FAIL select core %0d", i); end
        if (i == core) begin
          checks++;
          if (req_o[i].addr != 32'(off) || req_o[i].we != we) begin
            failures++; $display("FAIL local address %h", req_o[i].addr);
          end
        end
      end
      if (we && core < N_C) model[core][off] = req_i.wdata;
      @(negedge clk);
      req_i = '0;
      #1;
      if (!we) begin
        checks++;
        if (rdata_o != ((core < N_C) ? model[core][off] : 32'd0)) begin
          failures++; $display("FAIL read core %0d off %0d: %h", core, off, rdata_o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
