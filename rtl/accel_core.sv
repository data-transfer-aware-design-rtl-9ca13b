// accel_core: one MIMD accelerator core for window-based image processing.
//
// The core processes N_W windows at once, one per window lane, each lane
// taken from a different partial image. A lane owns P_P local memory modules
// that together hold one scan area (W_H rows x P_W pixels of B_CA bits) and
// one PE array of P_P rows and log2(P_P)+1 columns. The P_P AGUs (one per
// memory module, shared by all lanes because every lane walks the same
// addresses) drive a pipeline:
//   AGU -> memory read + coefficient read -> PE columns -> output memory.
// With the reset context the array computes a FIR filter, the sum over the
// window of pixel x coefficient, one window result of B_AC bits per window
// position x = 0 .. P_W-W_W, written to the lane's output memory.
// One sequence takes W_H*W_W/P_P*(P_W-W_W+1) issue cycles plus LAT cycles of
// pipeline fill and hand-shake, which is the document's t_comp.
//
// Bus side (single-cycle internal bus, read data one cycle after the
// request), word offsets inside the core's window, region in the two bits
// above an OFFW-bit offset:
//   RG_CTRL  off 0  W: [0] start, [1] first sequence  R: [0] busy [1] done [15:8] top
//            off 1  R: cycles of the last run
//            off CTX_BASE + c*P_P + r   R/W: context of PE (r, c)
//   RG_COEF  {row, col}                R/W: 16-bit signed coefficient
//   RG_IN    {group, slot, col}        R/W: N_CA = B_B/B_CA pixels of lanes
//                                      group*N_CA .. , pixel i in bits i*B_CA+
//   RG_OUT   {group, x}                R:   N_AC = B_B/B_AC results of lanes
//                                      group*N_AC .. , result i in bits i*B_AC+
// Packing several lanes' words into one bus word is the document's transfer
// model (Eqs. (5), (9)); the map itself is this design's. Any bus write to
// the core, and any read outside the control region, is a data transfer and
// pauses the data path for that cycle; status polling does not.
module accel_core
  import acc_pkg::*;
#(
  parameter int unsigned N_W  = 4,
  parameter int unsigned P_P  = 1,
  parameter int unsigned W_H  = 16,
  parameter int unsigned W_W  = 16,
  parameter int unsigned P_W  = 94,
  parameter int unsigned B_CA = 8,
  parameter int unsigned B_AC = 16,
  localparam int unsigned OFFW = core_off_w(N_W, P_P, W_H, W_W, P_W, B_CA, B_AC)
)(
  input  logic             clk,
  input  logic             rst_n,
  input  sbus_req_t        bus,       // addr: word offset inside this core
  output logic [BUS_W-1:0] rdata,
  output logic             busy,
  output logic             done
);

  localparam int unsigned COLS  = pe_cols(P_P);
  localparam int unsigned C_M   = W_H / P_P;
  localparam int unsigned NX    = P_W - W_W + 1;
  localparam int unsigned DEPTH = C_M * P_W;
  localparam int unsigned AW    = (DEPTH <= 1) ? 1 : $clog2(DEPTH);
  localparam int unsigned XW    = (NX <= 1) ? 1 : $clog2(NX);
  localparam int unsigned OAW   = XW;
  localparam int unsigned CIW   = $clog2(W_H * W_W);
  localparam int unsigned TW    = $clog2(W_H);
  localparam int unsigned N_CA  = per_word(B_CA);
  localparam int unsigned N_AC  = per_word(B_AC);
  localparam int unsigned G_IN  = cdiv(N_W, N_CA);
  localparam int unsigned G_OUT = cdiv(N_W, N_AC);
  localparam int unsigned F_COL = fw(P_W);
  localparam int unsigned F_SLT = fw(W_H);
  localparam int unsigned F_CC  = fw(W_W);
  localparam int unsigned F_X   = fw(NX);
  localparam int unsigned F_PP  = fw(P_P);
  localparam int unsigned TAGW  = XW + 2;

  // ---------------------------------------------------------------- bus decode
  region_e          region;
  logic [OFFW-1:0]  off;
  logic             rd, wr;

  assign region = region_e'(bus.addr[OFFW +: 2]);
  assign off    = bus.addr[OFFW-1:0];
  assign rd     = bus.req && !bus.we;
  assign wr     = bus.req &&  bus.we;

  // input region fields
  logic [31:0] in_g, in_slot, in_col, in_mod, in_addr;
  logic        in_ok;
  assign in_g    = 32'(off) >> (F_SLT + F_COL);
  assign in_slot = (32'(off) >> F_COL) & ((32'd1 << F_SLT) - 1);
  assign in_col  = 32'(off) & ((32'd1 << F_COL) - 1);
  assign in_mod  = in_slot & ((32'd1 << F_PP) - 1);
  assign in_addr = (in_slot >> F_PP) * P_W + in_col;
  assign in_ok   = (region == RG_IN) && in_g < G_IN && in_slot < W_H && in_col < P_W;

  // output region fields
  logic [31:0] out_g, out_x;
  logic        out_ok;
  assign out_g  = 32'(off) >> F_X;
  assign out_x  = 32'(off) & ((32'd1 << F_X) - 1);
  assign out_ok = (region == RG_OUT) && out_g < G_OUT && out_x < NX;

  // coefficient region fields
  logic [31:0] cf_row, cf_col, cf_idx;
  logic        cf_ok;
  assign cf_row = 32'(off) >> F_CC;
  assign cf_col = 32'(off) & ((32'd1 << F_CC) - 1);
  assign cf_idx = cf_row * W_W + cf_col;
  assign cf_ok  = (region == RG_COEF) && cf_row < W_H && cf_col < W_W;

  // context fields
  logic [31:0] cx_idx;
  logic        cx_ok;
  assign cx_idx = 32'(off) - CTX_BASE;
  assign cx_ok  = (region == RG_CTRL) && 32'(off) >= CTX_BASE && cx_idx < COLS * P_P;

  // ---------------------------------------------------------------- control
  logic          cmd_start, cmd_first, agu_start, en, fin_wr;
  logic [TW-1:0] top;
  logic [31:0]   cycles;

  // Every bus access except a read of the control region (status polling)
  // is a data transfer and pauses the data path for its cycle.
  logic pause;
  assign pause = bus.req && (bus.we || region != RG_CTRL);

  assign cmd_start = wr && region == RG_CTRL && 32'(off) == CTRL_REG && bus.wdata[0];
  assign cmd_first = bus.wdata[1];

  core_ctrl #(.W_H(W_H)) u_ctrl (
    .clk, .rst_n, .cmd_start, .cmd_first,
    .pause (pause),
    .fin_wr, .agu_start, .en, .busy, .done, .top, .cycles
  );

  // ---------------------------------------------------------------- registers
  logic [DW-1:0] coef_r [W_H*W_W];
  pe_ctx_t       ctx_r  [COLS][P_P];

  // Reset program: FIR filter. Column 0 multiplies pixel by coefficient,
  // later columns add pairs (row r takes rows 2r and 2r+1), and the single
  // PE that produces the result (row 0 of the last column) accumulates.
  function automatic pe_ctx_t default_ctx(input int unsigned c, input int unsigned r);
    pe_ctx_t x;
    x.op    = (c == 0) ? OP_MUL : OP_ADD;
    x.acc   = (c == COLS - 1) && (r == 0);
    x.shift = '0;
    x.sel_a = 4'(2 * r);
    x.sel_b = 4'(2 * r + 1);
    return x;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < COLS; c++)
        for (int r = 0; r < P_P; r++)
          ctx_r[c][r] <= default_ctx(c, r);
      for (int i = 0; i < W_H * W_W; i++)
        coef_r[i] <= '0;
    end else if (wr) begin
      if (cx_ok) ctx_r[cx_idx >> F_PP][cx_idx & ((32'd1 << F_PP) - 1)] <= pe_ctx_t'(bus.wdata[15:0]);
      if (cf_ok) coef_r[cf_idx] <= bus.wdata[DW-1:0];
    end
  end

  // ---------------------------------------------------------------- AGUs
  logic           a_valid [P_P];
  logic [AW-1:0]  a_addr  [P_P];
  logic [CIW-1:0] a_cidx  [P_P];
  logic           a_first [P_P];
  logic           a_last  [P_P];
  logic           a_fin   [P_P];
  logic [XW-1:0]  a_xpos  [P_P];
  logic           a_busy  [P_P];

  for (genvar j = 0; j < P_P; j++) begin : g_agu
    agu #(.P_P(P_P), .W_H(W_H), .W_W(W_W), .P_W(P_W), .LANE(j)) u_agu (
      .clk, .rst_n, .start(agu_start), .en, .top,
      .busy(a_busy[j]), .valid(a_valid[j]), .addr(a_addr[j]), .cidx(a_cidx[j]),
      .first(a_first[j]), .last(a_last[j]), .fin(a_fin[j]), .xpos(a_xpos[j])
    );
  end

  // Stage 1: memory read (inside local_mem) and coefficient read.
  logic            s1_valid, s1_first;
  logic [TAGW-1:0] s1_tag;
  logic [DW-1:0]   s1_coef [P_P];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_first <= 1'b0;
      s1_tag   <= '0;
      for (int j = 0; j < P_P; j++) s1_coef[j] <= '0;
    end else if (en) begin
      s1_valid <= a_valid[0];
      s1_first <= a_first[0];
      s1_tag   <= {a_fin[0], a_last[0], a_xpos[0]};
      for (int j = 0; j < P_P; j++) s1_coef[j] <= coef_r[a_cidx[j]];
    end
  end

  // ---------------------------------------------------------------- lanes
  logic [B_CA-1:0] in_rd   [N_W][P_P];
  logic [B_CA-1:0] px_rd   [N_W][P_P];
  logic [B_AC-1:0] out_rd  [N_W];
  logic            l_valid [N_W];
  logic [TAGW-1:0] l_tag   [N_W];
  logic [DW-1:0]   l_y     [N_W];

  for (genvar l = 0; l < N_W; l++) begin : g_lane
    localparam int unsigned GI = l / N_CA;
    localparam int unsigned BI = l % N_CA;
    localparam int unsigned GO = l / N_AC;

    logic [DW-1:0] pix [P_P];

    for (genvar j = 0; j < P_P; j++) begin : g_mem
      local_mem #(.DW(B_CA), .DEPTH(DEPTH)) u_in (
        .clk,
        .a_en    (in_ok && in_g == GI && in_mod == j),
        .a_we    (wr),
        .a_addr  (AW'(in_addr)),
        .a_wdata (bus.wdata[BI*B_CA +: B_CA]),
        .a_rdata (in_rd[l][j]),
        .b_en    (en),
        .b_we    (1'b0),
        .b_addr  (a_addr[j]),
        .b_wdata ('0),
        .b_rdata (px_rd[l][j])
      );
      assign pix[j] = DW'(px_rd[l][j]);
    end

    pe_array #(.P_P(P_P), .TAGW(TAGW)) u_pes (
      .clk, .rst_n, .en,
      .ctx       (ctx_r),
      .in_valid  (s1_valid),
      .in_first  (s1_first),
      .in_tag    (s1_tag),
      .pix       (pix),
      .coef      (s1_coef),
      .out_valid (l_valid[l]),
      .out_tag   (l_tag[l]),
      .y         (l_y[l])
    );

    // Result of a window is ready when its last sample leaves the array.
    local_mem #(.DW(B_AC), .DEPTH(NX)) u_out (
      .clk,
      .a_en    (rd && out_ok && out_g == GO),
      .a_we    (1'b0),
      .a_addr  (OAW'(out_x)),
      .a_wdata ('0),
      .a_rdata (out_rd[l]),
      .b_en    (en && l_valid[l] && l_tag[l][XW]),
      .b_we    (1'b1),
      .b_addr  (OAW'(l_tag[l][XW-1:0])),
      .b_wdata (B_AC'(l_y[l])),
      .b_rdata ()
    );
  end

  assign fin_wr = en && l_valid[0] && l_tag[0][XW+1];

  // ---------------------------------------------------------------- read back
  region_e     rd_region;
  logic [31:0] rd_g, rd_mod;
  logic [31:0] rd_reg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_region <= RG_CTRL;
      rd_g      <= '0;
      rd_mod    <= '0;
      rd_reg    <= '0;
    end else if (rd) begin
      rd_region <= region;
      rd_g      <= (region == RG_IN) ? in_g : out_g;
      rd_mod    <= in_mod;
      rd_reg    <= '0;
      if (region == RG_CTRL) begin
        if (32'(off) == CTRL_REG)       rd_reg <= {16'd0, 8'(top), 6'd0, done, busy};
        else if (32'(off) == CYCLE_REG) rd_reg <= cycles;
        else if (cx_ok)                 rd_reg <= 32'(ctx_r[cx_idx >> F_PP][cx_idx & ((32'd1 << F_PP) - 1)]);
      end else if (region == RG_COEF && cf_ok) begin
        rd_reg <= 32'(coef_r[cf_idx]);
      end
    end
  end

  always_comb begin
    rdata = '0;
    unique case (rd_region)
      RG_IN:
        for (int i = 0; i < N_CA; i++)
          if (rd_g * N_CA + i < N_W)
            rdata[i*B_CA +: B_CA] = in_rd[rd_g * N_CA + i][rd_mod];
      RG_OUT:
        for (int i = 0; i < N_AC; i++)
          if (rd_g * N_AC + i < N_W)
            rdata[i*B_AC +: B_AC] = out_rd[rd_g * N_AC + i];
      default: rdata = rd_reg;
    endcase
  end

  // The document's transfer model assumes the bus is at least as wide as a word.
  initial begin
    assert (BUS_W >= B_CA && BUS_W >= B_AC) else $error("bus narrower than a data word");
    assert (W_H % P_P == 0) else $error("P_P must divide W_H (Eq. 1)");
    assert ((P_P & (P_P - 1)) == 0) else $error("P_P must be a power of two");
  end

endmodule
