// tb_agu: self-checking test of the address generation unit.
// Configuration P_P = 2, W_H = 4, W_W = 3, P_W = 6, module LANE = 1, for
// every row pointer top = 0..3. The expected address stream is generated by
// nested loops over window position, column and row group; each issued
// (address, coefficient index, first, last, fin, xpos) is compared in order.
// Random pause cycles (en low) must not drop or repeat addresses, and a run
// without pauses must issue one address per cycle, W_H*W_W/P_P*(P_W-W_W+1)
// in all.
module tb_agu;
  localparam int unsigned P_P = 2, W_H = 4, W_W = 3, P_W = 6, LANE = 1;
  localparam int unsigned C_M = W_H / P_P, NX = P_W - W_W + 1;
  localparam int unsigned NOPS = W_H * W_W / P_P * NX;
  localparam int unsigned AW = $clog2(C_M * P_W), CIW = $clog2(W_H * W_W);
  localparam int unsigned TW = $clog2(W_H), XW = $clog2(NX);

  logic clk = 0, rst_n = 0, start = 0, en = 1;
  logic [TW-1:0] top = '0;
  logic busy, valid, first, last, fin;
  logic [AW-1:0] addr;
  logic [CIW-1:0] cidx;
  logic [XW-1:0] xpos;
  int checks = 0, failures = 0;

  agu #(.P_P(P_P), .W_H(W_H), .W_W(W_W), .P_W(P_W), .LANE(LANE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {int addr, cidx, first, last, fin, x;} step_t;
  step_t exp_q [$];

  task automatic build(int t);
    exp_q.delete();
    for (int x = 0; x < NX; x++)
      for (int c = 0; c < W_W; c++)
        for (int k = 0; k < C_M; k++) begin
          step_t s;
          int lrow = (k * P_P + LANE - t + W_H) % W_H;
          s.addr = k * P_W + x + c;
          s.cidx = lrow * W_W + c;
          s.first = (c == 0 && k == 0);
          s.last = (c == W_W - 1 && k == C_M - 1);
          s.fin = s.last && (x == NX - 1);
          s.x = x;
          exp_q.push_back(s);
        end
  endtask

  task automatic run(int t, bit pauses);
    int got = 0, cyc = 0, first_cyc = -1, last_cyc = 0;
    build(t);
    top = TW'(t);
    start = 1;
    @(negedge clk);
    start = 0;
    while (got < NOPS && cyc < 500) begin
      en = pauses ? ($urandom_range(0, 2) != 0) : 1'b1;
      @(posedge clk);
      #1;
      if (valid && en) begin
        step_t s = exp_q.pop_front();
        checks++;
        if (addr != AW'(s.addr) || cidx != CIW'(s.cidx) || first != s.first[0] ||
            last != s.last[0] || fin != s.fin[0] || xpos != XW'(s.x)) begin
          failures++;
          $display("FAIL top %0d step %0d: addr %0d/%0d cidx %0d/%0d f%0d l%0d fin%0d x%0d",
                   t, got, addr, s.addr, cidx, s.cidx, first, last, fin, xpos);
        end
        if (first_cyc < 0) first_cyc = cyc;
        last_cyc = cyc;
        got++;
      end
      cyc++;
      @(negedge clk);
    end
    en = 1;
    repeat (2) @(negedge clk);
    checks++;
    if (busy || valid) begin failures++; $display("FAIL AGU still busy after the last step"); end
    if (!pauses) begin
      checks++;
      if (last_cyc - first_cyc + 1 != NOPS) begin
        failures++; $display("FAIL issue rate: %0d cycles for %0d steps", last_cyc - first_cyc + 1, NOPS);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < W_H; t++) begin
      run(t, 0);
      run(t, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
