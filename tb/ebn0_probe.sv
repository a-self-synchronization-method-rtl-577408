// ebn0_probe - runs the whole link over an additive Gaussian noise channel
// at one Eb/N0 and measures synchronization and bit errors.
//
// Used by tb_link_ebn0.  The transmitter of an sscsc_top sends random
// words; each chip becomes +/-AMP plus Gaussian noise (a sum of twelve
// uniform values) of variance N0/2, where the energy per bit is
// Eb = L*M*AMP^2 / (K+N), and goes to the receiver of the same top.  The
// receiver starts at a random offset inside a frame.  At every frame pulse
// the probe knows whether the synchronizer's timing is right.  After the
// first acquisition it counts:
//   - frames with right and wrong timing, and the switches between them:
//     the mean run of right timing is the lose-lock time, the wrong frames
//     per loss of lock the recovery time (both in frames);
//   - bit errors of the words recovered with right timing (P_b1);
//   - the bit error rate including synchronization, weighting the time
//     with wrong timing by 1/2.
module ebn0_probe #(
  parameter int  NSTG = 10,
  parameter real EBN0_DB = 8.0,
  parameter int  FRAMES = 4000
) (
  input  logic clk,
  input  logic start,
  output logic done,
  output real  lose_lock,
  output real  recovery,
  output real  ber_aligned,
  output real  ber_sync,
  output int   losses
);
  localparam int K = 3, N = 3, L = N, M = 1 << K, LM = L * M, SW = 8, AMP = 24;

  logic rst = 1, tx_chip_en = 0, rx_valid = 0;
  logic [K+N-1:0] src_word = '0;
  logic signed [SW-1:0] rx_sample = '0;
  logic src_take, tx_valid, tx_chip, out_valid, frame_pulse;
  logic sync_dec, sync_hold, sync_renew;
  logic [K+N-1:0] out_word;
  logic [1:0] sync_c1;
  logic [$clog2(NSTG+1)-1:0] sync_c2;

  sscsc_top #(.NSTG(NSTG)) dut (
    .clk, .rst, .tx_chip_en, .src_word, .src_take, .tx_valid, .tx_chip,
    .rx_valid, .rx_sample, .out_valid, .out_word, .frame_pulse,
    .sync_dec, .sync_hold, .sync_renew, .sync_c1, .sync_c2
  );

  real sigma;
  logic [K+N-1:0] words [FRAMES + 8];

  function automatic real gauss();
    real g;
    g = -6.0;
    for (int i = 0; i < 12; i++) g += real'($urandom % 65536) / 65536.0;
    return g;
  endfunction

  function automatic int clip(real v);
    int x;
    x = $rtoi(v < 0 ? v - 0.5 : v + 0.5);
    return x > 127 ? 127 : x < -128 ? -128 : x;
  endfunction

  initial begin
    int tx_frame, tx_pos, gen_frame, in_pos, in_frame, drop, frames;
    int acq, right, wrong, runs_right, runs_wrong, bits, errs;
    bit prev_right, first, new_word;
    int expect_q [$];
    done = 0; losses = 0;
    sigma = AMP * $sqrt(LM / (2.0 * (K + N) * (10.0 ** (EBN0_DB / 10.0))));
    tx_frame = 0; tx_pos = 0; gen_frame = 0; in_pos = -1; in_frame = -1;
    frames = 0; acq = 0; right = 0; wrong = 0; runs_right = 0; runs_wrong = 0;
    bits = 0; errs = 0; first = 1; prev_right = 0; new_word = 0;
    drop = 1 + int'($urandom % (LM - 1));
    words[0] = '0;
    src_word = (K+N)'($urandom);
    wait (start);
    repeat (2) @(negedge clk);
    rst = 0;
    while (frames < FRAMES) begin
      @(negedge clk);
      if (new_word) src_word = (K+N)'($urandom);
      new_word = 0;
      if (frame_pulse) begin
        bit now_right;
        now_right = (in_pos == LM - 1);
        frames++;
        if (now_right) right++;
        else if (right > 0) wrong++;
        else acq++;
        if (first || now_right != prev_right) begin
          if (now_right) runs_right++; else runs_wrong++;
          if (!first && !now_right) losses++;
        end
        first = 0;
        expect_q.push_back((now_right && prev_right) ? in_frame : -1);
        prev_right = now_right;
      end
      if (out_valid) begin
        int f;
        f = expect_q.pop_front();
        if (f >= 0) begin
          bits += K + N;
          errs += $countones(out_word ^ words[f]);
        end
      end
      rx_valid = 0;
      if (tx_valid) begin
        if (drop > 0) drop--;
        else begin
          rx_valid = 1;
          rx_sample = SW'(clip((tx_chip ? -AMP : AMP) + sigma * gauss()));
          in_frame = tx_frame;
          in_pos = tx_pos;
        end
        tx_pos++;
        if (tx_pos == LM) begin
          tx_pos = 0;
          tx_frame++;
        end
      end
      tx_chip_en = 1;
      #1;
      if (src_take) begin
        gen_frame++;
        if (gen_frame < FRAMES + 8) words[gen_frame] = src_word;
        new_word = 1;
      end
    end
    // the first run of right timing starts after acquisition, not a loss
    lose_lock = runs_right > 0 ? real'(right) / runs_right : 0.0;
    recovery = losses > 0 ? real'(wrong) / losses : 0.0;
    ber_aligned = bits > 0 ? real'(errs) / bits : 1.0;
    ber_sync = (right + wrong) > 0 ?
               (real'(right) * ber_aligned + real'(wrong) * 0.5) / (right + wrong) : 0.5;
    $display("n=%0d Eb/N0=%0.1f dB: acquisition %0d, right %0d, wrong %0d frames; lose-lock %0.1f, recovery %0.1f frames, losses %0d; BER right timing %0.2e, with sync %0.2e",
             NSTG, EBN0_DB, acq, right, wrong, lose_lock, recovery, losses, ber_aligned, ber_sync);
    done = 1;
  end
endmodule
