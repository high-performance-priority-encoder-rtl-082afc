// Self-checking test of one level of the encoding tree, at the width of the
// top level of the 256-input encoder (six lower address bits). For random
// look-ahead and address inputs the output must be the winner's two-bit
// block index followed by the winner's lower address, where the winner is
// the lowest-numbered block whose look-ahead is set. Patterns without any
// look-ahead are skipped: the address is a don't-care there.
module tb_pe_level;
  localparam int unsigned LOW_W = 6;
  logic [3:0]            la;
  logic [3:0][LOW_W-1:0] a_low;
  logic [LOW_W+1:0]      a;
  int checks = 0, failures = 0;

  pe_level #(.LOW_W(LOW_W)) dut (.la(la), .a_low(a_low), .a(a));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 30; rep++) begin
      for (int v = 1; v < 16; v++) begin
        int win;
        logic [LOW_W+1:0] exp_a;
        la = 4'(v);
        for (int i = 0; i < 4; i++) a_low[i] = LOW_W'($urandom);
        #1;
        win = 0;
        for (int i = 3; i >= 0; i--) if (v[i]) win = i;
        exp_a = {2'(win), a_low[win]};
        checks++;
        if (a !== exp_a) begin
          failures++;
          $display("FAIL la=%b a=%h expected %h", la, a, exp_a);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
