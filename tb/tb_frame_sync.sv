// tb_frame_sync - frame synchronizer acquiring and holding frame timing.
//
// The testbench models the transmitter itself (chip = d xor Walsh xor A,
// A from the recurrence a[k+10] = a[k+3] xor a[k]) with random words, and
// sends each chip as a sample of +/-AMP plus a little uniform noise.  The
// first received chip is chip P0 of its frame, so the synchronizer starts
// P0 chips off.  Every renewal shifts its timing one chip, so it must lock
// after exactly (L*M - P0) mod L*M renewals.  Checked: each output chip
// carries its input sample one clock later; once the label of every chip
// equals its true frame position the synchronizer counts as locked, after
// which it must never lose lock, must decide +1 at every frame pulse,
// must hold (C1 full) every m frames and must not renew any more.  The
// number of renewals before lock is checked as above.
module tb_frame_sync;
  localparam int K = 3, N = 3, L = N, M = 1 << K, LM = L * M, SW = 8;
  localparam int MS = 3, NS = 10, AMP = 40;
  localparam int P0 = LM - 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, in_valid = 0;
  logic signed [SW-1:0] in_sample = '0;
  logic out_valid, out_code_end, out_frame_end, dec, hold, renew;
  logic signed [SW-1:0] out_sample;
  logic [K-1:0] out_chip_idx;
  logic [1:0]   out_seq_idx, c1;
  logic [3:0]   c2;

  frame_sync #(.K(K), .N(N), .MSTG(MS), .NSTG(NS), .SW(SW)) dut (
    .clk, .rst, .in_valid, .in_sample, .out_valid, .out_sample, .out_chip_idx,
    .out_seq_idx, .out_code_end, .out_frame_end, .dec, .hold, .renew, .c1, .c2
  );

  always #5 clk = !clk;

  bit a [LM + 10];
  logic [K+N-1:0] word;
  int pos = P0, sent_pos, n_renew = 0, n_hold = 0, locked_frames = 0;
  int lock_at = -1, lost = 0, frames = 0, dec_fail = 0;
  logic signed [SW-1:0] sent_sample;
  bit was_valid = 0;

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
    while (frames < 4000 && locked_frames < 60) begin
      @(negedge clk);
      // check the chip sent in the previous clock
      if (was_valid) begin
        checks++;
        if (!out_valid || out_sample !== sent_sample) begin
          failures++;
          $display("output sample mismatch");
        end
        if (int'(out_seq_idx) * M + int'(out_chip_idx) == sent_pos) begin
          if (out_frame_end) begin
            locked_frames++;
            frames++;
          end
        end else begin
          if (lock_at >= 0) lost++;
          locked_frames = 0;
          if (out_frame_end) frames++;
        end
        if (lock_at < 0 && locked_frames == 3) lock_at = n_renew;
        if (out_frame_end && locked_frames > 1 && !dec) dec_fail++;
      end
      n_renew += (in_valid && renew);
      if (locked_frames > 2) n_hold += (in_valid && hold);
      in_valid = ($urandom % 5) != 0;
      was_valid = in_valid;
      if (in_valid) begin
        int noise;
        noise = int'($urandom % 21) - 10;
        sent_sample = SW'((tx_chip(word, pos) ? -AMP : AMP) + noise);
        in_sample = sent_sample;
        sent_pos = pos;
        pos++;
        if (pos == LM) begin
          pos = 0;
          word = (K+N)'($urandom);
        end
      end
    end
    checks++;
    if (locked_frames < 60) begin
      failures++;
      $display("never locked: %0d renewals", n_renew);
    end
    checks++;
    if (lock_at != (LM - P0) % LM) begin
      failures++;
      $display("locked after %0d renewals, expected %0d", lock_at, (LM - P0) % LM);
    end
    checks++;
    if (lost != 0 || dec_fail != 0 || n_renew != lock_at) begin
      failures++;
      $display("after lock: lost %0d, -1 decisions %0d, renewals %0d", lost, dec_fail, n_renew - lock_at);
    end
    checks++;
    if (n_hold < 60 / MS - 2) begin
      failures++;
      $display("only %0d holds", n_hold);
    end
    $display("renewals %0d, frames %0d, holds while locked %0d", n_renew, frames, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
