// tb_code_decision - random sums, often with ties; the output must be the
// index of the largest sum, the lowest such index on a tie.
module tb_code_decision;
  localparam int K = 3, M = 1 << K, WS = 16;
  int checks = 0, failures = 0;
  logic [M-1:0][WS-1:0] sums;
  logic [K-1:0] sel;

  code_decision #(.K(K), .WS(WS)) dut (.sums, .sel);

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int best;
      for (int i = 0; i < M; i++)
        sums[i] = (t % 2) ? WS'($urandom % 8) : WS'($urandom);
      best = 0;
      for (int i = 0; i < M; i++) if (sums[i] > sums[best]) best = i;
      #1;
      checks++;
      if (int'(sel) != best) begin
        failures++;
        $display("t %0d: sel %0d want %0d", t, sel, best);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
