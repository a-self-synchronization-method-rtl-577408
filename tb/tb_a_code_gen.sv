// tb_a_code_gen - checks the scrambling code A(t).
//
// The reference is the linear recurrence a[k+10] = a[k+3] xor a[k] started
// from the ten seed bits, evaluated directly.  Also checks that the code
// is balanced enough to be useful (neither all +1 nor all -1) and that
// positions beyond the frame read +1.
module tb_a_code_gen;
  localparam int K = 3, L = 3, M = 1 << K, LM = L * M;
  localparam int PW = $clog2(LM);
  int checks = 0, failures = 0;
  logic [PW-1:0] pos;
  logic          chip;
  bit            a [LM + 10];
  int            ones = 0;

  a_code_gen #(.K(K), .L(L)) dut (.pos, .chip);

  initial begin
    for (int k = 0; k < 10; k++) a[k] = sscsc_pkg::A_SEED[k];
    for (int k = 0; k < LM; k++) a[k+10] = a[k+3] ^ a[k];
    for (int p = 0; p < LM; p++) begin
      pos = PW'(p);
      #1;
      checks++;
      ones += chip;
      if (chip !== a[p]) begin
        failures++;
        $display("A[%0d]: got %0d want %0d", p, chip, a[p]);
      end
    end
    checks++;
    if (ones == 0 || ones == LM) begin
      failures++;
      $display("A is constant");
    end
    for (int p = LM; p < (1 << PW); p++) begin
      pos = PW'(p);
      #1;
      checks++;
      if (chip !== 1'b0) failures++;
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
