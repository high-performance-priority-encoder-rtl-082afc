// Self-checking test of the simplified static 4-to-2 priority encoder.
// All 16 input patterns are applied. For every pattern with at least one 1
// the output must be the index of the lowest-numbered 1; for the all-zero
// pattern the simplified equations give 3, which is checked as well since
// the upper levels rely on that block being skipped, not on its value.
module tb_pe_enc4to2;
  logic [3:0] in;
  logic [1:0] a;
  int checks = 0, failures = 0;

  pe_enc4to2 dut (.in(in), .a(a));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int exp_idx;
      in = 4'(v);
      #1;
      exp_idx = 3;
      for (int i = 3; i >= 0; i--) if (v[i]) exp_idx = i;
      checks++;
      if (a !== 2'(exp_idx)) begin
        failures++;
        $display("FAIL in=%b a=%0d expected %0d", in, a, exp_idx);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
