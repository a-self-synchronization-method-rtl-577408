// tb_decision_circuit - exhaustive: for L = 3 and L = 4 every pattern of
// (L-1) majority outputs, +1 exactly when their +1/-1 sum is >= 0.
module tb_decision_circuit;
  int checks = 0, failures = 0;
  logic [1:0] maj3;
  logic [2:0] maj4;
  logic dec3, dec4;

  decision_circuit #(.L(3)) dut3 (.maj(maj3), .dec(dec3));
  decision_circuit #(.L(4)) dut4 (.maj(maj4), .dec(dec4));

  initial begin
    for (int p = 0; p < 4; p++) begin
      int sum;
      sum = 0;
      maj3 = 2'(p);
      for (int j = 0; j < 2; j++) sum += maj3[j] ? 1 : -1;
      #1;
      checks++;
      if (dec3 !== (sum >= 0)) begin
        failures++;
        $display("L=3 maj %b: got %0d", maj3, dec3);
      end
    end
    for (int p = 0; p < 8; p++) begin
      int sum;
      sum = 0;
      maj4 = 3'(p);
      for (int j = 0; j < 3; j++) sum += maj4[j] ? 1 : -1;
      #1;
      checks++;
      if (dec4 !== (sum >= 0)) begin
        failures++;
        $display("L=4 maj %b: got %0d", maj4, dec4);
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
