// tb_sscsc_tx - checks the transmitter chip by chip.
//
// Chip enables come with random gaps.  Every frame's word is random; the
// expected chip p of a frame (sequence s = p / M, chip j = p % M) is
// d_s xor Walsh(code, j) xor A[p], with the Walsh chip taken from a
// popcount and A from the linear recurrence a[k+10] = a[k+3] xor a[k].
// Also checks that src_take comes exactly once every L*M chips.
module tb_sscsc_tx;
  localparam int K = 3, N = 3, L = N, M = 1 << K, LM = L * M;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, chip_en = 0;
  logic [K+N-1:0] src_word = '0;
  logic src_take, tx_valid, tx_chip;

  sscsc_tx #(.K(K), .N(N)) dut (.clk, .rst, .chip_en, .src_word, .src_take, .tx_valid, .tx_chip);

  always #5 clk = !clk;

  bit a [LM + 10];
  logic [K+N-1:0] cur_word = '0, next_word;
  int chip_no = 0, takes = 0, frames = 0;

  function automatic bit expect_chip(logic [K+N-1:0] w, int p);
    int s = p / M, j = p % M;
    logic [K-1:0] code = w[K+N-1 -: K];
    bit d = w[N-1-s];
    bit pn = $countones(int'(code) & j) % 2;
    return d ^ pn ^ a[p];
  endfunction

  initial begin
    for (int k = 0; k < 10; k++) a[k] = sscsc_pkg::A_SEED[k];
    for (int k = 0; k < LM; k++) a[k+10] = a[k+3] ^ a[k];
    next_word = (K+N)'($urandom);
    src_word = next_word;
    repeat (2) @(posedge clk);
    rst = 0;
    while (frames < 60) begin
      @(negedge clk);
      chip_en = ($urandom % 4) != 0;
      src_word = next_word;
      #1;
      if (src_take) begin
        takes++;
        checks++;
        if (chip_no % LM != LM - 1) begin
          failures++;
          $display("src_take at chip %0d of the frame", chip_no % LM);
        end
      end
      @(posedge clk); #1;
      if (tx_valid) begin
        checks++;
        if (tx_chip !== expect_chip(cur_word, chip_no % LM)) begin
          failures++;
          $display("frame %0d chip %0d: got %0d", frames, chip_no % LM, tx_chip);
        end
        if (chip_no % LM == LM - 1) begin
          frames++;
          cur_word = next_word;
          next_word = (K+N)'($urandom);
        end
        chip_no++;
      end
    end
    checks++;
    if (takes != frames) begin
      failures++;
      $display("src_take %0d times in %0d frames", takes, frames);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
