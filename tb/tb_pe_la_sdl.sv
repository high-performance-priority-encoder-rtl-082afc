// Self-checking test of the split-node domino look-ahead with its
// set-dominant latch (16 inputs, two nodes of eight). Each cycle: inputs
// are applied in precharge, eval rises, and la_dyn and la_static must both
// equal the OR of the inputs; a late rising input during evaluation must
// still set them. Then eval falls: la_dyn must return to 0 while la_static
// keeps the evaluated value even though the inputs change.
module tb_pe_la_sdl;
  logic        eval;
  logic [15:0] in;
  logic        la_dyn, la_static;
  int checks = 0, failures = 0;
  int n_hold1 = 0, n_hold0 = 0, n_late = 0;

  pe_la_sdl #(.W(16)) dut (.eval(eval), .in(in), .la_dyn(la_dyn), .la_static(la_static));

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b (in=%h eval=%b)", what, got, exp, in, eval);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic any;
    eval = 1'b0;
    in   = '0;
    #5;
    for (int cyc = 0; cyc < 400; cyc++) begin
      logic [15:0] v;
      case (cyc % 4)
        0: v = '0;
        1: v = 16'(1 << ($urandom % 16));
        default: v = ($urandom % 3 == 0) ? 16'($urandom) : '0;
      endcase
      in = v;
      #5 eval = 1'b1;
      #1;
      any = |v;
      check("la_dyn in evaluation", la_dyn, any);
      check("la_static in evaluation", la_static, any);
      if (!any && cyc % 8 == 4) begin
        // a match line that rises late in the evaluate phase
        in[$urandom % 16] = 1'b1;
        #1;
        check("la_dyn late rise", la_dyn, 1'b1);
        check("la_static late rise", la_static, 1'b1);
        any = 1'b1;
        n_late++;
      end
      #4 eval = 1'b0;
      #1;
      check("la_dyn in precharge", la_dyn, 1'b0);
      check("la_static held", la_static, any);
      in = 16'($urandom);
      #1;
      check("la_static held, inputs changed", la_static, any);
      if (any) n_hold1++; else n_hold0++;
      in = '0;
      #3;
    end
    checks++;
    if (n_hold1 == 0 || n_hold0 == 0 || n_late == 0) begin
      failures++;
      $display("FAIL coverage: hold1=%0d hold0=%0d late=%0d", n_hold1, n_hold0, n_late);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
