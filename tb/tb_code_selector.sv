// tb_code_selector - drives random code chips and selections and checks
// that the selected generator's chip comes out.
module tb_code_selector;
  localparam int K = 3, M = 1 << K;
  int checks = 0, failures = 0;
  logic [M-1:0] codes;
  logic [K-1:0] sel;
  logic         chip;

  code_selector #(.K(K)) dut (.codes, .sel, .chip);

  initial begin
    for (int t = 0; t < 500; t++) begin
      codes = M'($urandom);
      sel   = K'($urandom);
      #1;
      checks++;
      if (chip !== ((codes >> sel) & 1'b1)) begin
        failures++;
        $display("sel %0d codes %b: got %0d", sel, codes, chip);
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
