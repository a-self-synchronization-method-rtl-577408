// tb_sync_workloads - the synchronizer configurations of the numerical
// study, run one after the other.
//
//   K = 3, L = 3, m = 3, n = 5 / 10 / 15    (lose lock and recovery vs n)
//   K = 3, L = 3, n = 5, m = 1 / 2 / 4       (trade-off in m; m = 3 above)
//   K = 3, m = 3, n = 10, L = 2 / 4 / 8      (constraint length)
//
// Each sync_probe acquires frame timing from random offsets and checks the
// renewal count, the n-frames-per-renewal lower bound and the hold after
// lock.  Across configurations the mean acquisition time must grow with n
// (n = 15 slower than n = 5), since every renewal waits for C2 to fill,
// and with L (L = 8 slower than L = 2), since a frame has L*M offsets.
// The noise is bounded, not the AWGN of the analysis, so the times are not
// the document's curves.
module tb_sync_workloads;
  localparam int NP = 9;
  logic clk = 0;
  logic start [NP];
  logic done [NP];
  int   pc [NP], pf [NP];
  real  mf [NP];
  int   checks = 0, failures = 0;

  always #5 clk = !clk;

  sync_probe #(.N(3), .MSTG(3), .NSTG(5))  p0 (.clk, .start(start[0]), .done(done[0]), .checks(pc[0]), .failures(pf[0]), .mean_frames(mf[0]));
  sync_probe #(.N(3), .MSTG(3), .NSTG(10)) p1 (.clk, .start(start[1]), .done(done[1]), .checks(pc[1]), .failures(pf[1]), .mean_frames(mf[1]));
  sync_probe #(.N(3), .MSTG(3), .NSTG(15)) p2 (.clk, .start(start[2]), .done(done[2]), .checks(pc[2]), .failures(pf[2]), .mean_frames(mf[2]));
  sync_probe #(.N(3), .MSTG(1), .NSTG(5))  p3 (.clk, .start(start[3]), .done(done[3]), .checks(pc[3]), .failures(pf[3]), .mean_frames(mf[3]));
  sync_probe #(.N(3), .MSTG(2), .NSTG(5))  p4 (.clk, .start(start[4]), .done(done[4]), .checks(pc[4]), .failures(pf[4]), .mean_frames(mf[4]));
  sync_probe #(.N(3), .MSTG(4), .NSTG(5))  p5 (.clk, .start(start[5]), .done(done[5]), .checks(pc[5]), .failures(pf[5]), .mean_frames(mf[5]));
  sync_probe #(.N(2), .MSTG(3), .NSTG(10)) p6 (.clk, .start(start[6]), .done(done[6]), .checks(pc[6]), .failures(pf[6]), .mean_frames(mf[6]));
  sync_probe #(.N(4), .MSTG(3), .NSTG(10)) p7 (.clk, .start(start[7]), .done(done[7]), .checks(pc[7]), .failures(pf[7]), .mean_frames(mf[7]));
  sync_probe #(.N(8), .MSTG(3), .NSTG(10), .TRIALS(6)) p8 (.clk, .start(start[8]), .done(done[8]), .checks(pc[8]), .failures(pf[8]), .mean_frames(mf[8]));

  initial begin
    for (int i = 0; i < NP; i++) start[i] = 0;
    for (int i = 0; i < NP; i++) begin
      start[i] = 1;
      wait (done[i]);
      checks += pc[i];
      failures += pf[i];
    end
    checks++;
    if (!(mf[2] > mf[0])) begin
      failures++;
      $display("acquisition with n = 15 (%0.1f) not slower than with n = 5 (%0.1f)", mf[2], mf[0]);
    end
    checks++;
    if (!(mf[8] > mf[6])) begin
      failures++;
      $display("acquisition with L = 8 (%0.1f) not slower than with L = 2 (%0.1f)", mf[8], mf[6]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
