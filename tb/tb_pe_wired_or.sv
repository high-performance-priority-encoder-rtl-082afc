// Self-checking test of the footless wired-OR node (eight inputs).
// In precharge (eval = 0) the node must stay high whatever the inputs; in
// evaluation it must be low exactly when some input is 1. Random and
// corner patterns (none, each single line, all lines) are applied.
module tb_pe_wired_or;
  logic       eval;
  logic [7:0] in;
  logic       node_n;
  int checks = 0, failures = 0;

  pe_wired_or #(.W(8)) dut (.eval(eval), .in(in), .node_n(node_n));

  task automatic apply(input logic e, input logic [7:0] v);
    logic exp_n;
    eval = e;
    in   = v;
    #1;
    exp_n = 1'b1;
    for (int i = 0; i < 8; i++) if (e && v[i]) exp_n = 1'b0;
    checks++;
    if (node_n !== exp_n) begin
      failures++;
      $display("FAIL eval=%b in=%b node_n=%b expected %b", e, v, node_n, exp_n);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      apply(e[0], 8'h00);
      apply(e[0], 8'hff);
      for (int i = 0; i < 8; i++) apply(e[0], 8'(1 << i));
    end
    for (int r = 0; r < 200; r++) apply(1'($urandom), 8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
