// pe_array: two-dimensional array of PEs for one window lane of a core.
//
// The array has P_P rows and log2(P_P)+1 columns, the size needed to map the
// tree-shaped data-flow graph of a window operation with P_P pixels read in
// parallel. Only the leftmost column reads the local memories: PE (r,0) gets
// pixel pix[r] as operand a and coefficient coef[r] as operand b. A PE in a
// later column takes its operands from any two PEs of the previous column,
// chosen by the sel_a/sel_b fields of its context, which makes the
// interconnect reconfigurable at run time. The result leaves from PE row 0
// of the rightmost column, the only column that writes back to memory.
//
// Timing: one register per column, so data and the tag travel COLS cycles.
// in_first marks the first sample of a window and clears accumulating PEs
// when it reaches them; in_valid/in_tag travel alongside for the caller
// (window position, last-sample flag). en freezes the whole array.
// The row/column shape and the leftmost/rightmost memory rule follow the
// document; the operand-select network is this design's choice.
module pe_array
  import acc_pkg::*;
#(
  parameter int unsigned P_P  = 1,
  parameter int unsigned TAGW = 1,
  localparam int unsigned COLS = pe_cols(P_P)
)(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  pe_ctx_t             ctx [COLS][P_P],
  input  logic                in_valid,
  input  logic                in_first,
  input  logic [TAGW-1:0]     in_tag,
  input  logic [DW-1:0]       pix  [P_P],
  input  logic [DW-1:0]       coef [P_P],
  output logic                out_valid,
  output logic [TAGW-1:0]     out_tag,
  output logic [DW-1:0]       y
);

  logic [DW-1:0]   pe_y  [COLS][P_P];
  logic [DW-1:0]   opa   [COLS][P_P];
  logic [DW-1:0]   opb   [COLS][P_P];
  logic            vld   [COLS+1];
  logic            fst   [COLS+1];
  logic [TAGW-1:0] tag   [COLS+1];

  assign vld[0] = in_valid;
  assign fst[0] = in_first;
  assign tag[0] = in_tag;

  for (genvar c = 0; c < COLS; c++) begin : g_col
    for (genvar r = 0; r < P_P; r++) begin : g_row
      if (c == 0) begin : g_mem
        assign opa[c][r] = pix[r];
        assign opb[c][r] = coef[r];
      end else begin : g_net
        assign opa[c][r] = (32'(ctx[c][r].sel_a) < P_P) ? pe_y[c-1][ctx[c][r].sel_a] : '0;
        assign opb[c][r] = (32'(ctx[c][r].sel_b) < P_P) ? pe_y[c-1][ctx[c][r].sel_b] : '0;
      end
      pe u_pe (
        .clk, .rst_n, .en,
        .clr (fst[c]),
        .ctx (ctx[c][r]),
        .a   (opa[c][r]),
        .b   (opb[c][r]),
        .y   (pe_y[c][r])
      );
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        vld[c+1] <= 1'b0;
        fst[c+1] <= 1'b0;
        tag[c+1] <= '0;
      end else if (en) begin
        vld[c+1] <= vld[c];
        fst[c+1] <= fst[c];
        tag[c+1] <= tag[c];
      end
    end
  end

  assign out_valid = vld[COLS];
  assign out_tag   = tag[COLS];
  assign y         = pe_y[COLS-1][0];

endmodule
