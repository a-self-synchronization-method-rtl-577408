// tb_racing_counters - the race between C1 (m = 3) and C2 (n = 10).
//
// Frame pulses come every F chip ticks.  Phase 1: the decision is always
// +1, so C1 fills after m frames: hold must pulse for one chip every m
// frames and renew never.  Phase 2: the decision is always -1, so renew
// must pulse for one chip every n frames.  Phase 3: random decisions
// against a model of the counters as the document states them (C1 counts
// +1 decisions at frame pulses, C2 counts frame pulses, a full counter
// clears both one chip later, C2 full with C1 not full renews).
module tb_racing_counters;
  localparam int MS = 3, NS = 10, F = 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, chip_tick = 0, frame_pulse = 0, dec = 0;
  logic [1:0] c1;
  logic [3:0] c2;
  logic hold, renew;
  int tick_no = 0, frames = 0, n_hold = 0, n_renew = 0;
  int m1 = 0, m2 = 0;

  racing_counters #(.MSTG(MS), .NSTG(NS)) dut (
    .clk, .rst, .chip_tick, .frame_pulse, .dec, .c1, .c2, .hold, .renew
  );

  always #5 clk = !clk;

  task automatic run_phase(int mode, int nframes);
    frames = 0; n_hold = 0; n_renew = 0;
    while (frames < nframes) begin
      @(negedge clk);
      chip_tick   = ($urandom % 4) != 0;
      frame_pulse = chip_tick && (tick_no % F == F - 1);
      dec = (mode == 1) ? 1'b1 : (mode == 2) ? 1'b0 : 1'($urandom);
      #1;
      checks++;
      if (int'(c1) != m1 || int'(c2) != m2 || hold !== (m1 == MS) ||
          renew !== (m2 == NS && m1 != MS)) begin
        failures++;
        $display("mode %0d tick %0d: c1 %0d/%0d c2 %0d/%0d", mode, tick_no, c1, m1, c2, m2);
      end
      if (chip_tick) begin
        n_hold  += hold;
        n_renew += renew;
        if (m1 == MS || m2 == NS) begin
          m1 = 0; m2 = 0;
        end else if (frame_pulse) begin
          m2++;
          if (dec) m1++;
        end
        if (frame_pulse) frames++;
        tick_no++;
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    run_phase(1, 30);
    checks++;
    if (n_hold < 30 / MS - 1 || n_renew != 0) begin
      failures++;
      $display("all +1: %0d holds %0d renewals", n_hold, n_renew);
    end
    run_phase(2, 40);
    checks++;
    if (n_renew < 40 / NS - 1 || n_hold > 1) begin   // one hold may finish phase 1
      failures++;
      $display("all -1: %0d holds %0d renewals", n_hold, n_renew);
    end
    run_phase(3, 400);
    checks++;
    if (n_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
