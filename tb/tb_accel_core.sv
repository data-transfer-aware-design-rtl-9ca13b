// tb_accel_core: self-checking test of one accelerator core.
// Small configuration: N_W = 3 window lanes (so one bus group is only partly
// used), P_P = 2 (two memory modules per lane, a 2x2 PE array), 4x3 window,
// scan areas 8 pixels wide, partial images 9 rows high (6 sequences, so the
// row pointer wraps). The test plays the CPU: it loads random coefficients,
// transfers the first scan area of every lane, starts a first sequence, then
// for each further sequence overwrites the obsolete row with the new one and
// starts again. Every window result is read back and compared with a 2-D
// filter computed here. Checks also: the cycle count of a sequence is
// W_H*W_W/P_P*(P_W-W_W+1) + COLS + 2, status polling does not slow a run
// but each data transfer during it pauses the core by exactly one cycle, register and memory read-back, and a
// run-time reprogramming of the PE contexts (sum of absolute differences
// against the coefficient window).
module tb_accel_core;
  import acc_pkg::*;

  localparam int unsigned N_W = 3, P_P = 2, W_H = 4, W_W = 3, P_W = 8, P_H = 9;
  localparam int unsigned B_CA = 8, B_AC = 16;
  localparam int unsigned NX = P_W - W_W + 1, COLS = pe_cols(P_P);
  localparam int unsigned NOPS = W_H * W_W / P_P * NX;
  localparam int unsigned OFFW = core_off_w(N_W, P_P, W_H, W_W, P_W, B_CA, B_AC);
  localparam int unsigned F_COL = fw(P_W), F_SLT = fw(W_H), F_CC = fw(W_W), F_X = fw(NX);

  logic clk = 0, rst_n = 0;
  sbus_req_t bus;
  logic [BUS_W-1:0] rdata;
  logic busy, done;
  int checks = 0, failures = 0;

  accel_core #(.N_W(N_W), .P_P(P_P), .W_H(W_H), .W_W(W_W), .P_W(P_W),
               .B_CA(B_CA), .B_AC(B_AC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  function automatic logic [31:0] a(region_e rg, int off);
    return 32'((int'(rg) << OFFW) | off);
  endfunction

  task automatic bus_wr(logic [31:0] addr, logic [31:0] d);
    bus = '0; bus.req = 1; bus.we = 1; bus.addr = addr; bus.wdata = d;
    @(negedge clk);
    bus = '0;
  endtask

  task automatic bus_rd(logic [31:0] addr, output logic [31:0] d);
    bus = '0; bus.req = 1; bus.addr = addr;
    @(negedge clk);
    bus = '0;
    d = rdata;
  endtask

  logic [7:0]  img  [N_W][P_H][P_W];
  logic [15:0] coef [W_H][W_W];
  int          sad_mode = 0;

  task automatic write_row(int row, int slot);
    for (int c = 0; c < P_W; c++) begin
      logic [31:0] d = '0;
      for (int l = 0; l < N_W; l++) d[l*8 +: 8] = img[l][row][c];
      bus_wr(a(RG_IN, (slot << F_COL) | c), d);
    end
  endtask

  task automatic check_results(int seq);
    logic [31:0] d;
    for (int g = 0; g < 2; g++)
      for (int x = 0; x < NX; x++) begin
        bus_rd(a(RG_OUT, (g << F_X) | x), d);
        for (int i = 0; i < 2; i++) begin
          int l = g * 2 + i;
          logic [15:0] e = '0;
          if (l >= N_W) begin
            check("unused lane reads 0", d[i*16 +: 16], 0);
            continue;
          end
          for (int r = 0; r < W_H; r++)
            for (int c = 0; c < W_W; c++)
              if (sad_mode != 0)
                e += 16'((int'(img[l][seq + r][x + c]) > int'(signed'(coef[r][c])))
                         ? int'(img[l][seq + r][x + c]) - int'(signed'(coef[r][c]))
                         : int'(signed'(coef[r][c])) - int'(img[l][seq + r][x + c]));
              else
                e += 16'(int'(img[l][seq + r][x + c]) * int'(signed'(coef[r][c])));
          check($sformatf("seq %0d lane %0d x %0d", seq, l, x), d[i*16 +: 16], e);
        end
      end
  endtask

  task automatic run_seq(bit first, int npoll, int seq, int exp_top);
    logic [31:0] d;
    int n = 0;
    bus_wr(a(RG_CTRL, CTRL_REG), {30'd0, first, 1'b1});
    // status polls while running do not disturb the core; each data
    // transfer to it (here: rewriting a coefficient with its own value)
    // pauses it for one cycle
    for (int i = 0; i < 3; i++) begin
      bus_rd(a(RG_CTRL, CTRL_REG), d);
      check("busy while running", d[0], 1);
    end
    for (int i = 0; i < npoll; i++) begin
      bus_wr(a(RG_COEF, (1 << F_CC) | 2), 32'(coef[1][2]));
      @(negedge clk);
    end
    while (!done && n < 10000) begin @(negedge clk); n++; end
    bus_rd(a(RG_CTRL, CYCLE_REG), d);
    check($sformatf("seq %0d cycles", seq), d, NOPS + COLS + 2 + npoll);
    bus_rd(a(RG_CTRL, CTRL_REG), d);
    check("status done", d[1:0], 2'b10);
    check("row pointer", d[15:8], exp_top);
    check_results(seq);
  endtask

  initial begin
    logic [31:0] d;
    bus = '0;
    for (int l = 0; l < N_W; l++)
      for (int r = 0; r < P_H; r++)
        for (int c = 0; c < P_W; c++) img[l][r][c] = 8'($urandom);
    for (int r = 0; r < W_H; r++)
      for (int c = 0; c < W_W; c++) coef[r][c] = 16'($urandom_range(0, 64)) - 16'd32;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int r = 0; r < W_H; r++)
      for (int c = 0; c < W_W; c++) bus_wr(a(RG_COEF, (r << F_CC) | c), 32'(coef[r][c]));
    bus_rd(a(RG_COEF, (2 << F_CC) | 1), d);
    check("coefficient read-back", d[15:0], coef[2][1]);
    // sequence 1: the whole scan area
    for (int r = 0; r < W_H; r++) write_row(r, r);
    bus_rd(a(RG_IN, (3 << F_COL) | 5), d);
    check("pixel read-back", d[23:0], {img[2][3][5], img[1][3][5], img[0][3][5]});
    run_seq(1, 0, 0, 0);
    // sequences 2..: one new row into the obsolete slot
    for (int s = 1; s <= P_H - W_H; s++) begin
      write_row(s + W_H - 1, (s - 1) % W_H);
      run_seq(0, s % 3, s, s % W_H);
    end
    // reprogram column 0 for absolute differences and rerun the last area
    for (int r = 0; r < P_P; r++) begin
      pe_ctx_t x;
      bus_rd(a(RG_CTRL, CTX_BASE + r), d);
      x = pe_ctx_t'(d[15:0]);
      check("context read-back op", x.op, OP_MUL);
      x.op = OP_ABSDIFF;
      bus_wr(a(RG_CTRL, CTX_BASE + r), 32'(x));
    end
    sad_mode = 1;
    // restart as a first sequence over the rows now held, in slot order
    for (int r = 0; r < W_H; r++) write_row(P_H - W_H + r, r);
    run_seq(1, 1, P_H - W_H, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
