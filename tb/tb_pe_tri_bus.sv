// Self-checking test of the look-ahead arbitrated local bus.
// All 16 look-ahead patterns, each with random bus data: the enables must
// select the lowest-numbered block with a match (block 3 when none has one)
// as a one-hot vector, and the bus must carry that block's data.
module tb_pe_tri_bus;
  localparam int unsigned W = 6;
  logic [3:0]        la;
  logic [3:0][W-1:0] din;
  logic [3:0]        en;
  logic [W-1:0]      bus;
  int checks = 0, failures = 0;

  pe_tri_bus #(.W(W)) dut (.la(la), .din(din), .en(en), .bus(bus));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 20; rep++) begin
      for (int v = 0; v < 16; v++) begin
        int win;
        la = 4'(v);
        for (int i = 0; i < 4; i++) din[i] = W'($urandom);
        #1;
        win = 3;
        for (int i = 3; i >= 0; i--) if (v[i]) win = i;
        checks++;
        if (en !== 4'(1 << win) || bus !== din[win]) begin
          failures++;
          $display("FAIL la=%b en=%b bus=%h expected en=%b bus=%h", la, en, bus,
                   4'(1 << win), din[win]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
