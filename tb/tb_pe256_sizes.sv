// Checks the encoder tree at sizes other than the default: LEVELS = 2
// (16 lines, a single 16-to-4 block), 3 (64 lines) and 5 (1024 lines).
// For each size, every single-line pattern and random patterns of varied
// density are applied. In each evaluate phase, addr must be the first set
// line and match must be its OR. During precharge, match must hold.
module tb_pe256_sizes;
  logic        eval;
  logic [15:0]   ml2;
  logic [63:0]   ml3;
  logic [1023:0] ml5;
  logic [3:0]  addr2;
  logic [5:0]  addr3;
  logic [9:0]  addr5;
  logic        m2, m3, m5, md2, md3, md5;
  int checks = 0, failures = 0;

  pe256 #(.LEVELS(2)) dut2 (.eval(eval), .ml(ml2), .addr(addr2), .match(m2), .match_dyn(md2));
  pe256 #(.LEVELS(3)) dut3 (.eval(eval), .ml(ml3), .addr(addr3), .match(m3), .match_dyn(md3));
  pe256 #(.LEVELS(5)) dut5 (.eval(eval), .ml(ml5), .addr(addr5), .match(m5), .match_dyn(md5));

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int first_one(input logic [1023:0] v, input int n);
    for (int i = 0; i < n; i++) if (v[i]) return i;
    return -1;
  endfunction

  // Applies one pattern to all three sizes (truncated to each width).
  task automatic run(input logic [1023:0] v);
    int f2, f3, f5;
    ml2 = v[15:0];
    ml3 = v[63:0];
    ml5 = v;
    #5 eval = 1'b1;
    #1;
    f2 = first_one(v, 16);
    f3 = first_one(v, 64);
    f5 = first_one(v, 1024);
    check("match2", int'(m2), int'(f2 >= 0));
    check("match3", int'(m3), int'(f3 >= 0));
    check("match5", int'(m5), int'(f5 >= 0));
    if (f2 >= 0) check("addr2", int'(addr2), f2);
    if (f3 >= 0) check("addr3", int'(addr3), f3);
    if (f5 >= 0) check("addr5", int'(addr5), f5);
    #4 eval = 1'b0;
    #1;
    check("hold5", int'(m5), int'(f5 >= 0));
    check("dyn5", int'(md5), 0);
    #4;
  endtask

  function automatic logic [1023:0] sparse(input int one_in);
    logic [1023:0] v = '0;
    for (int i = 0; i < 1024; i++) if ($urandom % one_in == 0) v[i] = 1'b1;
    return v;
  endfunction

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    eval = 1'b0;
    #5;
    for (int i = 0; i < 1024; i++) run(1024'(1) << i);
    run('0);
    for (int r = 0; r < 600; r++) run(sparse(2 << (r % 11)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
