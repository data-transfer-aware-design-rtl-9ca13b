// tb_local_mem: self-checking test of the dual-port local memory.
// Fills the memory through port A (bus side), reads it back through port B
// (data-path side) and the reverse, checks the one-cycle read latency, that
// a read with the port disabled holds its last data, and that port B wins
// a same-address write collision. A shadow array is the reference.
module tb_local_mem;
  localparam int unsigned DW = 8, DEPTH = 40, AW = $clog2(DEPTH);

  logic clk = 0;
  logic a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [AW-1:0] a_addr = '0, b_addr = '0;
  logic [DW-1:0] a_wdata = '0, b_wdata = '0, a_rdata, b_rdata;
  logic [DW-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  local_mem #(.DW(DW), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [DW-1:0] got, logic [DW-1:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      a_en = 1; a_we = 1; a_addr = AW'(i); a_wdata = DW'($urandom); shadow[i] = a_wdata;
      @(negedge clk);
    end
    a_en = 0; a_we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      b_en = 1; b_addr = AW'(DEPTH - 1 - i);
      @(negedge clk);
      check("B reads A's data", b_rdata, shadow[DEPTH - 1 - i]);
    end
    // port B writes, port A reads, one cycle latency
    for (int i = 0; i < DEPTH; i++) begin
      b_en = 1; b_we = 1; b_addr = AW'(i); b_wdata = DW'($urandom); shadow[i] = b_wdata;
      @(negedge clk);
    end
    b_we = 0; b_en = 0;
    for (int i = 0; i < DEPTH; i++) begin
      a_en = 1; a_addr = AW'(i);
      @(negedge clk);
      check("A reads B's data", a_rdata, shadow[i]);
    end
    // disabled port holds its output
    a_en = 0; a_addr = AW'(3);
    @(negedge clk);
    check("A holds", a_rdata, shadow[DEPTH - 1]);
    // collision: both write address 5, B wins
    a_en = 1; a_we = 1; a_addr = 5; a_wdata = 8'h11;
    b_en = 1; b_we = 1; b_addr = 5; b_wdata = 8'h22;
    @(negedge clk);
    a_we = 0; b_we = 0; a_addr = 5;
    @(negedge clk);
    check("collision", a_rdata, 8'h22);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
