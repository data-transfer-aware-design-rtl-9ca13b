// pe: processing element of the MIMD accelerator array.
//
// A PE holds a 16-bit fixed-point ALU and a multiplier. Each cycle it computes
// r = f(a, b) for the operation in its context word and registers the result,
// so every operation takes exactly one clock (fully pipelined). With the
// context's acc bit set the PE is an accumulator: y <= clr ? r : y + r, where
// clr marks the first sample of a new sum (a new window). Products are
// signed 16x16, arithmetically shifted right by ctx.shift and truncated to
// 16 bits; all arithmetic wraps. Compare gives the signed maximum or minimum.
//
// Ports: en freezes the register (pipeline pause); a, b operands; ctx the
// configuration; y the registered result.
// The operation list and 16-bit width follow the document; the shift for
// fixed-point products, wrap-around arithmetic and the encodings are this
// design's choices.
module pe
  import acc_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          clr,
  input  pe_ctx_t       ctx,
  input  logic [DW-1:0] a,
  input  logic [DW-1:0] b,
  output logic [DW-1:0] y
);

  logic signed [DW-1:0]   sa, sb;
  logic signed [DW:0]     diff;      // one extra bit: |a-b| never overflows
  logic signed [2*DW-1:0] prod;
  logic [DW-1:0]          r;

  assign sa   = signed'(a);
  assign sb   = signed'(b);
  assign diff = (DW+1)'(sa) - (DW+1)'(sb);
  assign prod = (sa * sb) >>> ctx.shift;

  always_comb begin
    unique case (ctx.op)
      OP_ADD:     r = a + b;
      OP_SUB:     r = diff[DW-1:0];
      OP_MUL:     r = prod[DW-1:0];
      OP_ABSDIFF: r = diff[DW] ? DW'(-diff) : diff[DW-1:0];
      OP_MAX:     r = (sa > sb) ? a : b;
      OP_MIN:     r = (sa < sb) ? a : b;
      OP_PASSA:   r = a;
      default:    r = b;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      y <= '0;
    else if (en) begin
      if (ctx.acc && !clr) y <= y + r;
      else                 y <= r;
    end
  end

endmodule
