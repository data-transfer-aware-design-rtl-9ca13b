// hmp_cpu_model: testbench model of the CPU side of the platform.
//
// It runs the document's processing schedule for one batch of
// W_P = N_C * N_W partial images (P_W x P_H pixels each) over an AXI4-Lite
// master and checks every result:
//   1. load the filter coefficients into every core;
//   2. sequence 1: for core 0, 1, ...: transfer the whole first scan area of
//      its N_W lanes (B_B/B_CA lanes per bus word), start it;
//   3. sequences 2 .. P_H-W_H+1: for each core in turn wait for done, read
//      its results (B_B/B_AC lanes per bus word), write the next image row
//      into the slot of the obsolete row, start the next sequence;
//   4. collect the results of the last sequence.
// Transfers to one core thus overlap the computation of the others.
// Pixels come from a hash of (partial image, row, column), so nothing has to
// be stored; each window result is compared with the 2-D filter sum.
// Mechanism counters (printed at the end, each must be non-zero unless the
// caller says the configuration cannot produce it):
//   first/next-sequence starts, row-pointer wrap, transfers overlapped with
//   another core's computation, a pause (data transfer to a busy core), CPU
//   waits for a core (case A2) and core waits for the CPU (case A1).
// Timing model: the model measures alpha and beta (bus cycles per input and
// per output word) and t_ctrl (cycles to start a core and see it done),
// evaluates the processing-time model of the schedule, Eqs. (6)-(15)
// (t_init + t_mid + t_final with the A1/A2 and B1-B3 cases), and compares
// it with the measured cycles of the batch; with MODEL_TOL > 0 the relative
// error must stay below it.
module hmp_cpu_model
  import acc_pkg::*;
#(
  parameter int unsigned N_C  = 2,
  parameter int unsigned N_W  = 3,
  parameter int unsigned P_P  = 2,
  parameter int unsigned W_H  = 4,
  parameter int unsigned W_W  = 3,
  parameter int unsigned P_W  = 8,
  parameter int unsigned P_H  = 10,
  parameter int unsigned B_CA = 8,
  parameter int unsigned B_AC = 16,
  parameter int unsigned SEED = 1,
  parameter bit          NEED_A1 = 1,
  parameter bit          NEED_A2 = 1,
  parameter real         MODEL_TOL = 0.0   // > 0: check the timing model to this relative error
)(
  input  logic           clk,
  input  logic           rst_n,
  output logic [31:0]    awaddr,
  output logic           awvalid,
  input  logic           awready,
  output logic [31:0]    wdata,
  output logic [3:0]     wstrb,
  output logic           wvalid,
  input  logic           wready,
  input  logic [1:0]     bresp,
  input  logic           bvalid,
  output logic           bready,
  output logic [31:0]    araddr,
  output logic           arvalid,
  input  logic           arready,
  input  logic [31:0]    rdata,
  input  logic [1:0]     rresp,
  input  logic           rvalid,
  output logic           rready,
  input  logic [N_C-1:0] busy_i,
  input  logic [N_C-1:0] done_i,
  output int             checks,
  output int             failures,
  output logic           finished
);

  localparam int unsigned NX    = P_W - W_W + 1;
  localparam int unsigned NSEQ  = P_H - W_H + 1;
  localparam int unsigned OFFW  = core_off_w(N_W, P_P, W_H, W_W, P_W, B_CA, B_AC);
  localparam int unsigned N_CA  = per_word(B_CA);
  localparam int unsigned N_AC  = per_word(B_AC);
  localparam int unsigned G_IN  = cdiv(N_W, N_CA);
  localparam int unsigned G_OUT = cdiv(N_W, N_AC);
  localparam int unsigned F_COL = fw(P_W), F_SLT = fw(W_H), F_CC = fw(W_W), F_X = fw(NX);

  axil_master_bfm #(.ADDR_W(32)) bfm (.*);

  int n_first = 0, n_next = 0, n_wrap = 0, n_overlap = 0, n_pause = 0;
  int n_cpu_wait = 0, n_core_wait = 0, n_results = 0;
  longint t_start, t_end, t_batch0;

  // Timing measurements for the processing-time model (Eqs. (6)-(16)):
  // alpha/beta = bus cycles per input/output word, t_ctrl = cycles to start
  // a core and see it done.
  longint cyc = 0;
  longint in_cyc = 0, in_words = 0, out_cyc = 0, out_words = 0, ctrl_cyc = 0, n_ctrl = 0;
  always @(posedge clk) cyc++;

  logic [15:0] coef [W_H][W_W];
  int          top  [N_C];

  function automatic logic [B_CA-1:0] pixel(int p, int r, int c);
    int unsigned h = (p * 7919 + r * 104729 + c * 1299709 + SEED * 15485863);
    h = h ^ (h >> 13);
    h = h * 32'h5bd1e995;
    return B_CA'(h ^ (h >> 15));
  endfunction

  function automatic logic [31:0] baddr(int core, region_e rg, int off);
    return 32'(((core << (OFFW + 2)) | (int'(rg) << OFFW) | off) << 2);
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic xfer_row(int core, int row, int slot);
    longint t0 = cyc;
    if ((busy_i & ~(N_C'(1) << core)) != 0) n_overlap++;
    for (int g = 0; g < G_IN; g++)
      for (int c = 0; c < P_W; c++) begin
        logic [31:0] d = '0;
        for (int i = 0; i < N_CA; i++)
          if (g * N_CA + i < N_W) d[i*B_CA +: B_CA] = pixel(core * N_W + g * N_CA + i, row, c);
        bfm.write(baddr(core, RG_IN, (g << (F_SLT + F_COL)) | (slot << F_COL) | c), d, c % 3);
      end
    in_cyc += cyc - t0;
    in_words += G_IN * P_W;
  endtask

  task automatic start(int core, bit first);
    longint t0 = cyc;
    bfm.write(baddr(core, RG_CTRL, CTRL_REG), {30'd0, first, 1'b1});
    ctrl_cyc += cyc - t0;
    n_ctrl++;
    if (first) begin top[core] = 0; n_first++; end
    else begin
      top[core] = (top[core] + 1) % W_H;
      n_next++;
      if (top[core] == 0) n_wrap++;
    end
  endtask

  task automatic wait_done(int core);
    logic [31:0] d;
    int polls = 0;
    forever begin
      longint t0 = cyc;
      bfm.read(baddr(core, RG_CTRL, CTRL_REG), d);
      if (d[1]) begin
        ctrl_cyc += cyc - t0;   // the poll that sees done is part of t_ctrl
        break;
      end
      // The first time a core is found busy, send it a data transfer
      // (rewrite a coefficient with its own value): it must pause for that
      // cycle and still produce correct results.
      if (polls == 0 && n_pause == 0) begin
        bfm.write(baddr(core, RG_COEF, 0), 32'(coef[0][0]));
        n_pause++;
      end
      polls++;
      if (polls > 1000000) begin check("core never finished", 0, 1); break; end
    end
    if (polls == 0) n_core_wait++; else n_cpu_wait++;
    check("row pointer", d[15:8], top[core]);
  endtask

  task automatic collect(int core, int seq);
    logic [31:0] d;
    longint t0 = cyc;
    for (int g = 0; g < G_OUT; g++)
      for (int x = 0; x < NX; x++) begin
        bfm.read(baddr(core, RG_OUT, (g << F_X) | x), d);
        for (int i = 0; i < N_AC; i++) begin
          int l = g * N_AC + i;
          logic [B_AC-1:0] e = '0;
          if (l >= N_W) continue;
          for (int r = 0; r < W_H; r++)
            for (int c = 0; c < W_W; c++)
              e += B_AC'(int'(pixel(core * N_W + l, seq + r, x + c)) * int'(signed'(coef[r][c])));
          check($sformatf("core %0d lane %0d seq %0d x %0d", core, l, seq, x), d[i*B_AC +: B_AC], e);
          n_results++;
        end
      end
    out_cyc += cyc - t0;
    out_words += G_OUT * NX;
  endtask

  // Processing time of one batch predicted by the timing model from the
  // measured alpha, beta and t_ctrl, in cycles.
  function automatic real model_cycles();
    real alpha, beta, t_ctrl, t_ca1, t_ca2, t_ac, t_comp, t_trans, t_init, t_mid, t_final;
    alpha   = real'(in_cyc) / real'(in_words);
    beta    = real'(out_cyc) / real'(out_words);
    t_ctrl  = real'(ctrl_cyc) / real'(n_ctrl);
    t_ca1   = alpha * G_IN * P_W * W_H;                           // Eq. (6)
    t_ca2   = alpha * G_IN * P_W;                                 // Eq. (7)
    t_comp  = real'(W_H * W_W / P_P * NX + fw(P_P) + 3);          // Eq. (8)
    t_ac    = beta * G_OUT * NX;                                  // Eq. (10)
    t_trans = t_ac + t_ca2 + t_ctrl;                              // Eq. (12)
    t_init  = t_ca1 * N_C + t_comp;                               // Eq. (11)
    if (t_comp < (N_C - 1) * t_trans) t_mid = N_C * t_trans * (P_H - W_H);       // Eq. (13) A1
    else                              t_mid = (t_trans + t_comp) * (P_H - W_H);  // A2
    if (t_comp >= (N_C - 1) * t_trans)   t_final = (N_C - 1) * t_trans + t_ac;   // Eq. (14) B1
    else if (t_comp >= (N_C - 1) * t_ac) t_final = t_ac + t_comp;                // B2
    else                                 t_final = N_C * t_ac;                   // B3
    $display("model: alpha %0.2f beta %0.2f t_ctrl %0.2f t_comp %0.0f t_trans %0.1f cycles (case %s)",
             alpha, beta, t_ctrl, t_comp, t_trans, (t_comp < (N_C - 1) * t_trans) ? "A1" : "A2");
    return t_init + t_mid + t_final;                              // Eq. (15)
  endfunction

  initial begin
    checks = 0; failures = 0; finished = 0;
    @(posedge rst_n);
    repeat (2) @(posedge clk);
    t_start = $time;
    for (int r = 0; r < W_H; r++)
      for (int c = 0; c < W_W; c++) coef[r][c] = 16'($urandom_range(0, 40)) - 16'd20;
    for (int k = 0; k < N_C; k++)
      for (int r = 0; r < W_H; r++)
        for (int c = 0; c < W_W; c++)
          bfm.write(baddr(k, RG_COEF, (r << F_CC) | c), 32'(coef[r][c]));
    // sequence 1
    t_batch0 = cyc;
    for (int k = 0; k < N_C; k++) begin
      for (int r = 0; r < W_H; r++) xfer_row(k, r, r);
      start(k, 1);
    end
    // sequences 2 .. NSEQ
    for (int s = 1; s < NSEQ; s++)
      for (int k = 0; k < N_C; k++) begin
        wait_done(k);
        collect(k, s - 1);
        xfer_row(k, s + W_H - 1, top[k]);
        start(k, 0);
      end
    for (int k = 0; k < N_C; k++) begin
      wait_done(k);
      collect(k, NSEQ - 1);
    end
    t_end = $time;
    begin
      real est, meas;
      meas = real'(cyc - t_batch0);
      est  = model_cycles();
      $display("batch: measured %0.0f cycles, timing model %0.0f cycles, error %0.2f %%",
               meas, est, 100.0 * ((meas > est) ? meas - est : est - meas) / meas);
      if (MODEL_TOL > 0.0) begin
        checks++;
        if (((meas > est) ? meas - est : est - meas) > MODEL_TOL * meas) begin
          failures++;
          $display("FAIL timing model off by more than %0.1f %%", 100.0 * MODEL_TOL);
        end
      end
    end
    check("results", n_results, N_C * N_W * NX * NSEQ);
    check("bus error responses", bfm.resp_errors, 0);
    $display("cycles %0d: %0d bus writes, %0d reads, %0d results",
             (t_end - t_start) / 10, bfm.n_writes, bfm.n_reads, n_results);
    $display("mechanisms: first-starts %0d next-starts %0d row-wraps %0d overlapped-transfers %0d",
             n_first, n_next, n_wrap, n_overlap);
    $display("            pauses %0d cpu-waits-core(A2) %0d core-waits-cpu(A1) %0d",
             n_pause, n_cpu_wait, n_core_wait);
    checks += 6;
    if (n_first == 0)   begin failures++; $display("FAIL no first-sequence start"); end
    if (n_next == 0)    begin failures++; $display("FAIL no next-sequence start"); end
    if (n_wrap == 0 && NSEQ > W_H) begin failures++; $display("FAIL row pointer never wrapped"); end
    if (n_overlap == 0 && N_C > 1) begin failures++; $display("FAIL no transfer overlapped computation"); end
    if (NEED_A2 && n_pause == 0)  begin failures++; $display("FAIL no pause"); end
    if ((NEED_A2 && n_cpu_wait == 0) || (NEED_A1 && n_core_wait == 0)) begin
      failures++; $display("FAIL expected overlap case not seen");
    end
    finished = 1;
  end

endmodule
