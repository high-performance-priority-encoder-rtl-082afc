// Self-checking test of the 16-to-4 direct-encode block.
// Every single-line pattern, the all-ones and the all-zero pattern, then
// random patterns of varied density are applied in precharge; in the
// evaluate phase addr must be the index of the lowest-numbered set line
// and both look-ahead outputs must show whether any line is set. In the
// following precharge la_dyn must fall and la_static must hold.
// The test also counts patterns where the winner sits behind an empty
// group (so a wrong 4-to-2 result had to be skipped) and patterns with
// several matches to resolve, and fails if either never occurred.
module tb_pe16;
  logic        eval;
  logic [15:0] ml;
  logic [3:0]  addr;
  logic        la_static, la_dyn;
  int checks = 0, failures = 0;
  int n_skip_empty = 0, n_multi = 0;

  pe16 dut (.eval(eval), .ml(ml), .addr(addr), .la_static(la_static), .la_dyn(la_dyn));

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (ml=%h)", what, got, exp, ml);
    end
  endtask

  task automatic run(input logic [15:0] v);
    int first, cnt;
    ml = v;
    #5 eval = 1'b1;
    #1;
    first = -1;
    cnt   = 0;
    for (int i = 15; i >= 0; i--) if (v[i]) begin first = i; cnt++; end
    check("la_static", int'(la_static), int'(cnt > 0));
    check("la_dyn", int'(la_dyn), int'(cnt > 0));
    if (cnt > 0) begin
      check("addr", int'(addr), first);
      if (first >= 4) n_skip_empty++;
      if (cnt > 1) n_multi++;
    end
    #4 eval = 1'b0;
    #1;
    check("la_dyn precharge", int'(la_dyn), 0);
    check("la_static hold", int'(la_static), int'(cnt > 0));
    #4;
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    eval = 1'b0;
    ml   = '0;
    #5;
    for (int i = 0; i < 16; i++) run(16'(1 << i));
    run('0);
    run('1);
    for (int r = 0; r < 2000; r++) begin
      logic [15:0] v;
      v = 16'($urandom) & 16'($urandom);
      if (r % 3 == 0) v &= 16'($urandom);
      run(v);
    end
    checks++;
    if (n_skip_empty == 0 || n_multi == 0) begin
      failures++;
      $display("FAIL coverage: skip_empty=%0d multi=%0d", n_skip_empty, n_multi);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
