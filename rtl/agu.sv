// agu: address generation unit for one local memory module of a core.
//
// A scan area is W_H rows by P_W columns. Its rows live in P_P memory modules:
// physical row slot s is held by module s mod P_P at local row s / P_P, so
// module LANE holds slots LANE, LANE+P_P, ... (C_M = W_H/P_P rows). Windows of
// W_H x W_W pixels slide left to right; for each window the AGU walks the
// columns one after another and, inside a column, the C_M row groups: this is
// the pixel-parallel, column-serial order, P_P pixels per cycle. For step
// (window x, column c, group k) it issues
//   address       = k*P_W + x + c
//   coefficient   = lrow*W_W + c, lrow = (k*P_P + LANE - top) mod W_H
// where top is the slot that holds the window's logical row 0. Rows are
// overwritten in place from one scan area to the next, so top rotates and the
// coefficient index follows it. The AGU runs in parallel with the PEs, so
// address work adds no cycles.
//
// Timing: start loads the counters; each cycle with en issues one address
// (outputs registered), W_H*W_W/P_P*(P_W-W_W+1) addresses in all. first/last
// mark the first and last step of a window, fin the very last step, xpos the
// window position. en low holds everything (pause).
// The scan-area layout and access order follow the document; the exact
// address function and row rotation are this design's own.
module agu #(
  parameter int unsigned P_P  = 1,
  parameter int unsigned W_H  = 16,
  parameter int unsigned W_W  = 16,
  parameter int unsigned P_W  = 94,
  parameter int unsigned LANE = 0,
  localparam int unsigned C_M   = W_H / P_P,
  localparam int unsigned NX    = P_W - W_W + 1,
  localparam int unsigned DEPTH = C_M * P_W,
  localparam int unsigned AW    = (DEPTH <= 1) ? 1 : $clog2(DEPTH),
  localparam int unsigned CIW   = $clog2(W_H * W_W),
  localparam int unsigned TW    = $clog2(W_H),
  localparam int unsigned XW    = (NX <= 1) ? 1 : $clog2(NX)
)(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic           en,
  input  logic [TW-1:0]  top,
  output logic           busy,
  output logic           valid,
  output logic [AW-1:0]  addr,
  output logic [CIW-1:0] cidx,
  output logic           first,
  output logic           last,
  output logic           fin,
  output logic [XW-1:0]  xpos
);

  localparam int unsigned KW = (C_M <= 1) ? 1 : $clog2(C_M);
  localparam int unsigned CW = (W_W <= 1) ? 1 : $clog2(W_W);

  logic [XW-1:0] x;
  logic [CW-1:0] c;
  logic [KW-1:0] k;
  logic [AW-1:0] kofs;        // k * P_W, kept incrementally
  logic          running;

  logic [TW:0]   slot, lrow;
  logic          k_end, c_end, x_end;

  assign k_end = (32'(k) == C_M - 1);
  assign c_end = (32'(c) == W_W - 1);
  assign x_end = (32'(x) == NX - 1);
  assign slot  = (TW+1)'(32'(k) * P_P + LANE);
  assign lrow  = (slot >= {1'b0, top}) ? slot - {1'b0, top} : slot + (TW+1)'(W_H) - {1'b0, top};

  assign busy = running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      x <= '0; c <= '0; k <= '0; kofs <= '0;
      valid <= 1'b0; addr <= '0; cidx <= '0;
      first <= 1'b0; last <= 1'b0; fin <= 1'b0; xpos <= '0;
    end else if (start) begin
      running <= 1'b1;
      x <= '0; c <= '0; k <= '0; kofs <= '0;
      valid <= 1'b0;
    end else if (en) begin
      valid <= running;
      if (running) begin
        addr  <= AW'(32'(kofs) + 32'(x) + 32'(c));
        cidx  <= CIW'(32'(lrow) * W_W + 32'(c));
        first <= (c == '0) && (k == '0);
        last  <= c_end && k_end;
        fin   <= c_end && k_end && x_end;
        xpos  <= x;
        if (!k_end) begin
          k    <= k + 1'b1;
          kofs <= AW'(32'(kofs) + P_W);
        end else begin
          k    <= '0;
          kofs <= '0;
          if (!c_end) c <= c + 1'b1;
          else begin
            c <= '0;
            if (!x_end) x <= x + 1'b1;
            else        running <= 1'b0;
          end
        end
      end
    end
  end

endmodule
