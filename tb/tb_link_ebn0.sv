// tb_link_ebn0 - the link over a Gaussian channel at several Eb/N0, for
// m = 3 and n = 5, 10, 15 (K = 3, N = 3), the settings of the published
// lose-lock, recovery and bit-error-rate study.
//
// Checked, as trends the synchronizer must show:
//   - n = 5: the lose-lock time grows with Eb/N0 (1 dB against 5 dB), and
//     at 1 dB lock is lost and regained several times;
//   - n = 10 at 8 dB: lock is never lost once acquired;
//   - the error rate including synchronization falls with Eb/N0 (n = 5 at
//     1 dB against 8 dB) and is below 1e-2 at 8 dB with n = 10;
//   - at the same Eb/N0 a larger n holds lock longer but recovers more
//     slowly (n = 15 against n = 5 at 3 dB).
// The printed times and rates can be set against the published curves;
// they are not compared with them.
module tb_link_ebn0;
  localparam int NP = 6;
  logic clk = 0;
  logic start [NP];
  logic done [NP];
  real  ll [NP], rc [NP], ba [NP], bs [NP];
  int   lo [NP];
  int   checks = 0, failures = 0;

  always #5 clk = !clk;

  ebn0_probe #(.NSTG(5),  .EBN0_DB(1.0)) p0 (.clk, .start(start[0]), .done(done[0]), .lose_lock(ll[0]), .recovery(rc[0]), .ber_aligned(ba[0]), .ber_sync(bs[0]), .losses(lo[0]));
  ebn0_probe #(.NSTG(5),  .EBN0_DB(5.0)) p1 (.clk, .start(start[1]), .done(done[1]), .lose_lock(ll[1]), .recovery(rc[1]), .ber_aligned(ba[1]), .ber_sync(bs[1]), .losses(lo[1]));
  ebn0_probe #(.NSTG(5),  .EBN0_DB(8.0)) p2 (.clk, .start(start[2]), .done(done[2]), .lose_lock(ll[2]), .recovery(rc[2]), .ber_aligned(ba[2]), .ber_sync(bs[2]), .losses(lo[2]));
  ebn0_probe #(.NSTG(10), .EBN0_DB(8.0)) p3 (.clk, .start(start[3]), .done(done[3]), .lose_lock(ll[3]), .recovery(rc[3]), .ber_aligned(ba[3]), .ber_sync(bs[3]), .losses(lo[3]));
  ebn0_probe #(.NSTG(5),  .EBN0_DB(3.0)) p4 (.clk, .start(start[4]), .done(done[4]), .lose_lock(ll[4]), .recovery(rc[4]), .ber_aligned(ba[4]), .ber_sync(bs[4]), .losses(lo[4]));
  ebn0_probe #(.NSTG(15), .EBN0_DB(3.0)) p5 (.clk, .start(start[5]), .done(done[5]), .lose_lock(ll[5]), .recovery(rc[5]), .ber_aligned(ba[5]), .ber_sync(bs[5]), .losses(lo[5]));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAILED: %s", what);
    end
  endtask

  initial begin
    for (int i = 0; i < NP; i++) start[i] = 0;
    for (int i = 0; i < NP; i++) begin
      start[i] = 1;
      wait (done[i]);
    end
    check(ll[1] > ll[0], "n=5 lose-lock time grows from 1 dB to 5 dB");
    check(lo[0] >= 3, "n=5 at 1 dB loses and regains lock");
    check(lo[3] == 0, "n=10 at 8 dB holds lock");
    check(bs[2] < bs[0], "error rate with sync falls from 1 dB to 8 dB");
    check(bs[3] < 1e-2, "error rate with sync below 1e-2 at 8 dB, n=10");
    check(ll[5] > ll[4], "n=15 holds lock longer than n=5 at 3 dB");
    check(rc[5] > rc[4], "n=15 recovers more slowly than n=5 at 3 dB");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
