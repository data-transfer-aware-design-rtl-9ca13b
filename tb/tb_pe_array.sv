// tb_pe_array: self-checking test of the PE array with P_P = 4 (3 columns).
// Program 1 is a FIR window: column 0 multiplies, column 1 adds pairs, the
// result PE adds and accumulates. Program 2 reprograms the same array at run
// time into a sum of absolute differences with a crossed operand network
// (column 1 row 0 adds rows 3 and 1, row 1 adds rows 2 and 0). Windows of
// random length are streamed back to back; every window result is compared
// with a reference sum, and the latency from the last input to out_valid is
// checked to be COLS cycles.
module tb_pe_array;
  import acc_pkg::*;

  localparam int unsigned P_P  = 4;
  localparam int unsigned COLS = pe_cols(P_P);
  localparam int unsigned TAGW = 8;

  logic clk = 0, rst_n = 0, en = 1;
  pe_ctx_t ctx [COLS][P_P];
  logic in_valid = 0, in_first = 0, out_valid;
  logic [TAGW-1:0] in_tag = '0, out_tag;
  logic [DW-1:0] pix [P_P], coef [P_P], y;
  int checks = 0, failures = 0;

  pe_array #(.P_P(P_P), .TAGW(TAGW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected results, indexed by the window number carried in the tag
  logic [DW-1:0] exp_q [256];
  int            last_t [256];
  int            cyc = 0, nres = 0, mode = 0;

  always @(posedge clk) cyc++;

  always @(negedge clk) if (rst_n && out_valid && en) begin
    if (out_tag[7]) begin
      checks++;
      if (y !== exp_q[out_tag[6:0]]) begin
        failures++;
        $display("FAIL window %0d: got %h expected %h", out_tag[6:0], y, exp_q[out_tag[6:0]]);
      end
      checks++;
      if (cyc - last_t[out_tag[6:0]] != COLS) begin
        failures++;
        $display("FAIL latency %0d", cyc - last_t[out_tag[6:0]]);
      end
      nres++;
    end
  end

  task automatic program_fir();
    for (int c = 0; c < COLS; c++)
      for (int r = 0; r < P_P; r++) begin
        ctx[c][r] = '0;
        ctx[c][r].op    = (c == 0) ? OP_MUL : OP_ADD;
        ctx[c][r].acc   = (c == COLS - 1) && (r == 0);
        ctx[c][r].sel_a = 4'(2 * r);
        ctx[c][r].sel_b = 4'(2 * r + 1);
      end
  endtask

  task automatic program_sad();
    program_fir();
    for (int r = 0; r < P_P; r++) ctx[0][r].op = OP_ABSDIFF;
    ctx[1][0].sel_a = 4'd3; ctx[1][0].sel_b = 4'd1;
    ctx[1][1].sel_a = 4'd2; ctx[1][1].sel_b = 4'd0;
  endtask

  task automatic run_windows(int nwin, int base, bit sad);
    for (int w = 0; w < nwin; w++) begin
      int n = $urandom_range(1, 9);
      logic [DW-1:0] acc = '0;
      for (int i = 0; i < n; i++) begin
        logic [DW-1:0] part = '0;
        for (int r = 0; r < P_P; r++) begin
          pix[r]  = 16'($urandom_range(0, 255));
          coef[r] = sad ? 16'($urandom_range(0, 255)) : 16'($urandom_range(0, 200)) - 16'd100;
          if (sad) part += (pix[r] > coef[r]) ? pix[r] - coef[r] : coef[r] - pix[r];
          else     part += 16'(int'(signed'(pix[r])) * int'(signed'(coef[r])));
        end
        acc += part;
        in_valid = 1; in_first = (i == 0);
        in_tag = {(i == n - 1), 7'(base + w)};
        if (i == n - 1) begin
          exp_q[base + w] = acc;
          last_t[base + w] = cyc;
        end
        @(negedge clk);
      end
    end
    in_valid = 0; in_tag = '0;
    repeat (COLS + 2) @(negedge clk);
  endtask

  initial begin
    for (int r = 0; r < P_P; r++) begin pix[r] = '0; coef[r] = '0; end
    program_fir();
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run_windows(40, 0, 0);
    program_sad();
    run_windows(40, 40, 1);
    checks++;
    if (nres != 80) begin failures++; $display("FAIL %0d results", nres); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
