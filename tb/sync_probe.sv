// sync_probe - measures frame acquisition of one frame_sync configuration.
//
// Used by tb_sync_workloads.  It models the transmitter (chip = d xor Walsh
// xor A, with A from the recurrence a[k+10] = a[k+3] xor a[k] started from
// the seed bits) with random words and sends each chip as +/-AMP plus
// noise (the sum of four uniform values, roughly Gaussian).  For each of
// TRIALS trials it resets the synchronizer, starts it a random number of
// chips P0 into a frame and counts frames until the labels of three
// consecutive frames match the true timing.  Then it checks:
//   - the number of renewals is (L*M - P0) mod L*M, as each renewal moves
//     the timing one chip;
//   - at least n frames passed per renewal (C2 must fill for each);
//   - lock then holds for HOLD_FRAMES frames.
// It reports the mean acquisition time in frames and its check counts.
module sync_probe #(
  parameter int K = 3, N = 3, MSTG = 3, NSTG = 10,
  parameter int TRIALS = 12, HOLD_FRAMES = 30, NOISE = 10
) (
  input  logic clk,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures,
  output real  mean_frames
);
  localparam int L = N, M = 1 << K, LM = L * M, SW = 8, AMP = 40;
  localparam int SQ = $clog2(L), W1 = $clog2(MSTG + 1), W2 = $clog2(NSTG + 1);

  logic rst = 1, in_valid = 0;
  logic signed [SW-1:0] in_sample = '0;
  logic out_valid, out_code_end, out_frame_end, dec, hold, renew;
  logic signed [SW-1:0] out_sample;
  logic [K-1:0] out_chip_idx;
  logic [SQ-1:0] out_seq_idx;
  logic [W1-1:0] c1;
  logic [W2-1:0] c2;

  frame_sync #(.K(K), .N(N), .MSTG(MSTG), .NSTG(NSTG), .SW(SW)) dut (
    .clk, .rst, .in_valid, .in_sample, .out_valid, .out_sample, .out_chip_idx,
    .out_seq_idx, .out_code_end, .out_frame_end, .dec, .hold, .renew, .c1, .c2
  );

  bit a [LM + 10];

  function automatic bit tx_chip(logic [K+N-1:0] w, int p);
    int s, j;
    s = p / M;
    j = p % M;
    return w[N-1-s] ^ bit'($countones(int'(w[K+N-1 -: K]) & j) % 2) ^ a[p];
  endfunction

  initial begin
    int total;
    done = 0; checks = 0; failures = 0; mean_frames = 0; total = 0;
    for (int k = 0; k < 10; k++) a[k] = sscsc_pkg::A_SEED[k];
    for (int k = 0; k < LM; k++) a[k+10] = a[k+3] ^ a[k];
    wait (start);
    for (int t = 0; t < TRIALS; t++) begin
      int p0, pos, sent_pos, frames, run, renewals, lost;
      logic [K+N-1:0] word;
      bit locked;
      p0 = int'($urandom % LM);
      pos = p0; frames = 0; run = 0; renewals = 0; lost = 0; locked = 0;
      word = (K+N)'($urandom);
      sent_pos = -1;
      rst = 1; in_valid = 0;
      repeat (2) @(negedge clk);
      rst = 0;
      while (frames < 200000) begin
        @(negedge clk);
        if (in_valid) begin
          renewals += renew;
          if (out_frame_end) begin
            frames++;
            if (int'(out_seq_idx) * M + int'(out_chip_idx) == sent_pos) run++;
            else begin
              if (locked) lost++;
              run = 0;
            end
            if (!locked && run == 3) begin
              locked = 1;
              total += frames;
              checks++;
              if (renewals != (LM - p0) % LM) begin
                failures++;
                $display("K=%0d L=%0d m=%0d n=%0d: %0d renewals for offset %0d", K, L, MSTG, NSTG, renewals, p0);
              end
              checks++;
              if (frames < renewals * NSTG) begin
                failures++;
                $display("K=%0d L=%0d m=%0d n=%0d: locked after %0d frames with %0d renewals", K, L, MSTG, NSTG, frames, renewals);
              end
              frames = 0;
            end
            if (locked && frames >= HOLD_FRAMES) break;
          end
        end
        in_valid = 1;
        in_sample = SW'((tx_chip(word, pos) ? -AMP : AMP) +
                        (int'($urandom % (2 * NOISE + 1)) - NOISE) / 2 +
                        (int'($urandom % (2 * NOISE + 1)) - NOISE) / 2 +
                        (int'($urandom % (2 * NOISE + 1)) - NOISE) / 2 +
                        (int'($urandom % (2 * NOISE + 1)) - NOISE) / 2);
        sent_pos = pos;
        pos++;
        if (pos == LM) begin
          pos = 0;
          word = (K+N)'($urandom);
        end
      end
      checks++;
      if (!locked || lost != 0) begin
        failures++;
        $display("K=%0d L=%0d m=%0d n=%0d: locked %0d, lost %0d", K, L, MSTG, NSTG, locked, lost);
      end
    end
    mean_frames = real'(total) / TRIALS;
    $display("K=%0d L=%0d m=%0d n=%0d: mean acquisition %0.1f frames over %0d trials",
             K, L, MSTG, NSTG, mean_frames, TRIALS);
    done = 1;
  end
endmodule
