// End-to-end test of the 256-input direct-encode priority encoder at its
// full size (no parameter overrides).
//
// Each operation is one evaluate/precharge cycle of eval: the match lines
// are applied during precharge, eval rises, and in that same evaluate phase
// addr must be the index of the lowest-numbered set line and match (and
// match_dyn) must show whether any line is set. During the next precharge
// match_dyn must be 0 and match must still hold its value while the match
// lines already change. The reference is a plain scan for the first 1.
//
// Stimulus: every single-line pattern (all 256 addresses), no match, all
// lines set, and random patterns whose density ranges from one line per
// 16-bit block down to one line in the whole array, so that every level's
// arbitration has to skip empty lower blocks.
//
// Mechanisms counted, each must occur: several matches resolved to the
// first one; at each of the four levels a winner that is not in that
// level's first lower block (an empty block with a wrong encoded value was
// skipped); no match at all; the latch holding match through precharge.
module tb_pe256;
  localparam int unsigned N  = 256;
  localparam int unsigned AW = 8;

  logic          eval;
  logic [N-1:0]  ml;
  logic [AW-1:0] addr;
  logic          match, match_dyn;
  int checks = 0, failures = 0;
  int n_multi = 0, n_nomatch = 0, n_hold = 0, n_ops = 0;
  int n_skip [4];

  pe256 dut (.eval(eval), .ml(ml), .addr(addr), .match(match), .match_dyn(match_dyn));

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: got %0d expected %0d (ml=%h)", what, got, exp, ml);
    end
  endtask

  task automatic run(input logic [N-1:0] v);
    int first, cnt;
    ml = v;
    #5 eval = 1'b1;
    #1;
    first = -1;
    cnt   = 0;
    for (int i = N - 1; i >= 0; i--) if (v[i]) begin first = i; cnt++; end
    check("match", int'(match), int'(cnt > 0));
    check("match_dyn", int'(match_dyn), int'(cnt > 0));
    if (cnt > 0) begin
      check("addr", int'(addr), first);
      if (cnt > 1) n_multi++;
      for (int l = 0; l < 4; l++)
        if (((first >> (2 * l)) & 3) != 0) n_skip[l]++;
    end else begin
      n_nomatch++;
    end
    #4 eval = 1'b0;
    #1;
    check("match_dyn precharge", int'(match_dyn), 0);
    check("match hold", int'(match), int'(cnt > 0));
    ml = ~v;  // next lines arrive while the result is held
    #1;
    check("match hold, lines changed", int'(match), int'(cnt > 0));
    n_hold++;
    n_ops++;
    #3;
  endtask

  function automatic logic [N-1:0] sparse(input int one_in);
    logic [N-1:0] v = '0;
    for (int i = 0; i < N; i++) if ($urandom % one_in == 0) v[i] = 1'b1;
    return v;
  endfunction

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (n_skip[l]) n_skip[l] = 0;
    eval = 1'b0;
    ml   = '0;
    #5;
    for (int i = 0; i < N; i++) run(N'(1) << i);
    run('0);
    run('1);
    for (int r = 0; r < 3000; r++) begin
      case (r % 5)
        0: run(sparse(4));
        1: run(sparse(16));
        2: run(sparse(64));
        3: run(sparse(256));
        default: run(sparse(1024));
      endcase
    end
    $display("operations=%0d multi=%0d nomatch=%0d hold=%0d skip_l1..4=%0d,%0d,%0d,%0d",
             n_ops, n_multi, n_nomatch, n_hold, n_skip[0], n_skip[1], n_skip[2], n_skip[3]);
    checks++;
    if (n_multi == 0 || n_nomatch == 0 || n_hold == 0 ||
        n_skip[0] == 0 || n_skip[1] == 0 || n_skip[2] == 0 || n_skip[3] == 0) begin
      failures++;
      $display("FAIL coverage: a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
