// tb_sscsc_rx - receiver with ideal frame timing.
//
// The testbench models the transmitter (chip = d xor Walsh xor A, A from
// the recurrence a[k+10] = a[k+3] xor a[k]) and sends random words as
// samples of +/-AMP with uniform noise, labelled with their true chip and
// sequence numbers and end-of-sequence / end-of-frame flags, with random
// valid gaps.  Every word must be recovered, three clocks after the chip
// that ends its frame.  Every code index and both polarities must occur.
module tb_sscsc_rx;
  localparam int K = 3, N = 3, L = N, M = 1 << K, LM = L * M, SW = 8, AMP = 40;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, in_valid = 0, code_end = 0, frame_end = 0;
  logic signed [SW-1:0] in_sample = '0;
  logic [K-1:0] chip_idx = '0;
  logic [1:0]   seq_idx = '0;
  logic out_valid;
  logic [K+N-1:0] out_word;
  logic [K+N-1:0] word, sent [$];
  int pos = 0, cyc = 0, frames = 0, words = 0;
  int end_cyc [$];
  bit seen_code [M];
  int ones = 0, zeros = 0;
  bit a [LM + 10];

  sscsc_rx #(.K(K), .N(N), .SW(SW)) dut (
    .clk, .rst, .in_valid, .in_sample, .chip_idx, .seq_idx, .code_end, .frame_end,
    .out_valid, .out_word
  );

  always #5 clk = !clk;

  function automatic bit tx_chip(logic [K+N-1:0] w, int p);
    int s, j;
    s = p / M;
    j = p % M;
    return w[N-1-s] ^ bit'($countones(int'(w[K+N-1 -: K]) & j) % 2) ^ a[p];
  endfunction

  initial begin
    for (int k = 0; k < 10; k++) a[k] = sscsc_pkg::A_SEED[k];
    for (int k = 0; k < LM; k++) a[k+10] = a[k+3] ^ a[k];
    word = (K+N)'($urandom);
    repeat (2) @(posedge clk);
    rst = 0;
    while (frames < 400) begin
      @(negedge clk);
      cyc++;
      if (out_valid) begin
        logic [K+N-1:0] w;
        int c;
        w = sent.pop_front();
        c = end_cyc.pop_front();
        checks++;
        if (out_word !== w || cyc - c != 3) begin
          failures++;
          $display("word %0d: got %h want %h, latency %0d", words, out_word, w, cyc - c);
        end
        seen_code[w[K+N-1 -: K]] = 1;
        ones += $countones(w[N-1:0]);
        zeros += N - $countones(w[N-1:0]);
        words++;
      end
      in_valid = ($urandom % 4) != 0;
      chip_idx = K'(pos % M);
      seq_idx = 2'(pos / M);
      code_end = (pos % M == M - 1);
      frame_end = (pos == LM - 1);
      if (in_valid) begin
        int noise;
        noise = int'($urandom % 61) - 30;
        in_sample = SW'((tx_chip(word, pos) ? -AMP : AMP) + noise);
        if (frame_end) begin
          sent.push_back(word);
          end_cyc.push_back(cyc);
          word = (K+N)'($urandom);
          frames++;
        end
        pos = (pos + 1) % LM;
      end
    end
    repeat (5) @(negedge clk);
    checks++;
    if (words < frames - 1) begin
      failures++;
      $display("only %0d words for %0d frames", words, frames);
    end
    for (int i = 0; i < M; i++) begin
      checks++;
      if (!seen_code[i]) failures++;
    end
    checks++;
    if (ones == 0 || zeros == 0) failures++;
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
