// tb_core_ctrl: self-checking test of the core controller (W_H = 4).
// Checks: a first-sequence start sets top to 0 and later starts advance it
// with wrap-around; agu_start pulses only for a start accepted while idle;
// a start while busy is ignored; en follows the bus pause; done rises with
// the final result write and is held until the next start; the cycle
// counter equals the number of cycles spent running.
module tb_core_ctrl;
  localparam int unsigned W_H = 4, TW = 2;

  logic clk = 0, rst_n = 0;
  logic cmd_start = 0, cmd_first = 0, pause = 0, fin_wr = 0;
  logic agu_start, en, busy, done;
  logic [TW-1:0] top;
  logic [31:0] cycles;
  int checks = 0, failures = 0;

  core_ctrl #(.W_H(W_H)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic one_run(bit first, int exp_top, int len);
    cmd_start = 1; cmd_first = first;
    #1 check("agu_start on idle start", agu_start, 1);
    @(negedge clk);
    cmd_start = 0; cmd_first = 0;
    check("busy", busy, 1);
    check("done cleared", done, 0);
    check("top", top, exp_top);
    // a second start while busy must be ignored
    cmd_start = 1;
    #1 check("no agu_start while busy", agu_start, 0);
    @(negedge clk);
    cmd_start = 0;
    for (int i = 2; i < len; i++) begin
      pause = ($urandom_range(0, 3) == 0);
      #1 check("en follows pause", en, !pause);
      @(negedge clk);
    end
    pause = 0;
    fin_wr = 1;
    @(negedge clk);
    fin_wr = 0;
    check("done", done, 1);
    check("idle", busy, 0);
    check("cycles", cycles, len);
    check("top kept", top, exp_top);
    repeat (3) @(negedge clk);
    check("done held", done, 1);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    one_run(1, 0, 10);
    one_run(0, 1, 7);
    one_run(0, 2, 12);
    one_run(0, 3, 5);
    one_run(0, 0, 9);   // wraps
    one_run(0, 1, 6);
    one_run(1, 0, 8);   // a new first sequence resets top
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
