// tb_sscsc_top - the whole link end to end, at the default sizes.
//
// The transmitter sends random words; a channel model in this testbench
// turns each chip into a sample of +/-AMP plus uniform noise and passes it
// to the receiver one clock later.  The receiver starts in the middle of a
// frame (the channel drops the first chips), so the synchronizer must
// acquire the frame timing by renewals.  Once locked, every recovered word
// is compared with the word sent in that frame.  Then the channel inserts
// a few extra noise chips (a timing glitch); the synchronizer must renew
// its timing again and the words must again come out right.
//
// Counted mechanisms, each of which must occur: timing renewal (C2 won the
// race), timing hold (C1 won), decision -1 and +1, both acquisitions, and
// every code index and both data polarities among the checked words.
module tb_sscsc_top;
  localparam int K = sscsc_pkg::DEF_K, N = sscsc_pkg::DEF_N, L = N;
  localparam int M = 1 << K, LM = L * M, SW = sscsc_pkg::DEF_SW;
  localparam int AMP = 40, NOISE = 25;
  localparam int DROP = 7, GLITCH = 3, RUN = 200, MAX_FRAMES = 30000;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, tx_chip_en = 0, rx_valid = 0;
  logic [K+N-1:0] src_word = '0;
  logic signed [SW-1:0] rx_sample = '0;
  logic src_take, tx_valid, tx_chip, out_valid, frame_pulse;
  logic sync_dec, sync_hold, sync_renew;
  logic [K+N-1:0] out_word;
  logic [1:0] sync_c1;
  logic [3:0] sync_c2;

  sscsc_top dut (
    .clk, .rst, .tx_chip_en, .src_word, .src_take, .tx_valid, .tx_chip,
    .rx_valid, .rx_sample, .out_valid, .out_word, .frame_pulse,
    .sync_dec, .sync_hold, .sync_renew, .sync_c1, .sync_c2
  );

  always #5 clk = !clk;

  // words of the transmitted frames, frame 0 carries the reset word 0
  logic [K+N-1:0] words [MAX_FRAMES + 2];
  int tx_frame = 0, tx_pos = 0, gen_frame = 0;
  // tag of the chip driven into the receiver in the previous clock
  int in_frame = -1, in_pos = -1;
  // expected words, one per frame pulse: frame number or -1 (not aligned)
  int expect_q [$];
  int drop = DROP, insert = 0;
  int aligned_run = 0, run_after = 0, phase = 0;
  bit renew_in_frame = 0, dec_pending = 0, new_word = 0;
  int n_renew = 0, n_hold = 0, n_dec_minus = 0, n_dec_plus = 0;
  int n_words = 0, n_acq = 0, rx_frames = 0;
  bit seen_code [M];
  int ones = 0, zeros = 0;

  initial begin
    words[0] = '0;
    src_word = (K+N)'($urandom);
    repeat (2) @(posedge clk);
    rst = 0;
    while (phase < 2 && rx_frames < MAX_FRAMES) begin
      @(negedge clk);
      if (new_word) src_word = (K+N)'($urandom);
      new_word = 0;
      // --- receiver side: results of the previous clock -----------------
      if (dec_pending) begin
        if (sync_dec) n_dec_plus++; else n_dec_minus++;
        dec_pending = 0;
      end
      if (rx_valid) begin
        n_renew += sync_renew;
        n_hold  += sync_hold;
        if (sync_renew) renew_in_frame = 1;
      end
      if (frame_pulse) begin
        rx_frames++;
        dec_pending = 1;
        if (in_pos == LM - 1) aligned_run++; else aligned_run = 0;
        expect_q.push_back((aligned_run >= 2 && !renew_in_frame) ? in_frame : -1);
        renew_in_frame = 0;
        if (aligned_run == 3) n_acq++;
      end
      if (out_valid) begin
        int f;
        f = expect_q.pop_front();
        if (f >= 0) begin
          checks++;
          n_words++;
          if (out_word !== words[f]) begin
            failures++;
            $display("frame %0d: got %h want %h", f, out_word, words[f]);
          end
          seen_code[words[f][K+N-1 -: K]] = 1;
          ones  += $countones(words[f][N-1:0]);
          zeros += N - $countones(words[f][N-1:0]);
          run_after++;
          if (run_after == RUN) begin
            phase++;
            run_after = 0;
            if (phase == 1) insert = GLITCH;   // timing glitch
          end
        end
      end
      // --- channel: pass the chip the transmitter produced ---------------
      rx_valid = 0;
      if (tx_valid) begin
        if (drop > 0) begin
          drop--;
        end else begin
          rx_valid = 1;
          rx_sample = SW'((tx_chip ? -AMP : AMP) + int'($urandom % (2 * NOISE + 1)) - NOISE);
          in_frame = tx_frame;
          in_pos = tx_pos;
        end
      end else if (insert > 0) begin
        rx_valid = 1;
        rx_sample = SW'(int'($urandom % (2 * AMP + 1)) - AMP);
        in_frame = -1;
        in_pos = -1;
        insert--;
        aligned_run = 0;
      end
      if (tx_valid) begin
        tx_pos++;
        if (tx_pos == LM) begin
          tx_pos = 0;
          tx_frame++;
        end
      end
      // --- transmitter: next chip and source word ------------------------
      tx_chip_en = (insert == 0) && (($urandom % 8) != 0);
      if (tx_chip_en) begin
        #1;
        if (src_take) begin
          gen_frame++;
          words[gen_frame] = src_word;   // latched at the coming edge
          new_word = 1;
        end
      end
    end
    checks++;
    if (phase < 2) begin
      failures++;
      $display("did not reach the end: phase %0d after %0d frames", phase, rx_frames);
    end
    checks++;
    if (n_renew == 0 || n_hold == 0 || n_dec_minus == 0 || n_dec_plus == 0 || n_acq < 2) begin
      failures++;
      $display("mechanism missing");
    end
    for (int i = 0; i < M; i++) begin
      checks++;
      if (!seen_code[i]) begin
        failures++;
        $display("code %0d never checked", i);
      end
    end
    checks++;
    if (ones == 0 || zeros == 0) failures++;
    $display("renewals %0d holds %0d decisions +1 %0d -1 %0d acquisitions %0d words %0d frames %0d",
             n_renew, n_hold, n_dec_plus, n_dec_minus, n_acq, n_words, rx_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
