// tb_pe: self-checking test of the processing element.
// Drives random operands through every operation, with and without
// accumulation, and compares the registered result with a reference model
// written from the operation definitions. Also checks that en low holds the
// result (pause) and that the result appears exactly one cycle after the
// operands (one-cycle operation).
module tb_pe;
  import acc_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, clr = 0;
  pe_ctx_t ctx;
  logic [DW-1:0] a, b, y;
  int checks = 0, failures = 0;

  pe dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [DW-1:0] ref_op(pe_op_e op, logic [3:0] sh, logic [DW-1:0] x, logic [DW-1:0] z);
    int sx, sz, p;
    sx = int'(signed'(x));
    sz = int'(signed'(z));
    case (op)
      OP_ADD:     return DW'(sx + sz);
      OP_SUB:     return DW'(sx - sz);
      OP_MUL:     begin p = (sx * sz) >>> sh; return DW'(p); end
      OP_ABSDIFF: return DW'((sx > sz) ? sx - sz : sz - sx);
      OP_MAX:     return (sx > sz) ? x : z;
      OP_MIN:     return (sx < sz) ? x : z;
      OP_PASSA:   return x;
      default:    return z;
    endcase
  endfunction

  task automatic check(string what, logic [DW-1:0] got, logic [DW-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  logic [DW-1:0] acc_m, r, held;

  initial begin
    ctx = '0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // plain operations
    for (int i = 0; i < 2000; i++) begin
      ctx.op = pe_op_e'($urandom_range(0, 7));
      ctx.acc = 1'b0;
      ctx.shift = 4'($urandom_range(0, 8));
      a = (i % 4 == 0) ? 16'h8000 + 16'($urandom_range(0, 3)) : 16'($urandom);
      b = (i % 8 == 1) ? 16'h7fff : 16'($urandom);
      en = 1;
      r = ref_op(ctx.op, ctx.shift, a, b);
      @(negedge clk);
      check($sformatf("op %s", ctx.op.name()), y, r);
    end
    // accumulation of products over windows of random length
    for (int w = 0; w < 50; w++) begin
      int n;
      n = $urandom_range(1, 40);
      acc_m = '0;
      for (int i = 0; i < n; i++) begin
        ctx.op = OP_MUL; ctx.acc = 1'b1; ctx.shift = '0;
        a = 16'($urandom_range(0, 255));
        b = 16'($urandom_range(0, 600)) - 16'd300;
        clr = (i == 0);
        r = ref_op(OP_MUL, 0, a, b);
        acc_m = (i == 0) ? r : acc_m + r;
        en = 1;
        @(negedge clk);
        // a pause cycle must not change the sum
        if ($urandom_range(0, 3) == 0) begin
          held = y;
          en = 0; a = 16'($urandom); clr = 1;
          @(negedge clk);
          check("pause holds", y, held);
          clr = (i == 0);
        end
      end
      check("accumulated window", y, acc_m);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
