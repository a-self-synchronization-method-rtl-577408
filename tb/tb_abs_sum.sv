// tb_abs_sum - random signed correlations in frames of L values; the sum of
// magnitudes over each frame must appear one clock after the last one.
module tb_abs_sum;
  localparam int VW = 13, L = 3, WS = VW + $clog2(L + 1);
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, v_valid = 0, frame_end = 0;
  logic signed [VW-1:0] v = '0;
  logic s_valid;
  logic [WS-1:0] s;
  int acc = 0, want, k = 0, frames = 0;
  bit pending = 0;

  abs_sum #(.VW(VW), .L(L)) dut (.clk, .rst, .v_valid, .v, .frame_end, .s_valid, .s);

  always #5 clk = !clk;

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    while (frames < 300) begin
      @(negedge clk);
      checks++;
      if (s_valid !== pending || (pending && int'(s) != want)) begin
        failures++;
        $display("frame %0d: s %0d want %0d valid %0d", frames, s, want, s_valid);
      end
      pending = 0;
      v_valid = 1'($urandom);
      v = VW'($urandom);
      if ($urandom % 50 == 0) v = {1'b1, {(VW-1){1'b0}}} + 1'b1;  // near most negative
      frame_end = (k == L - 1);
      if (v_valid) begin
        acc += (v < 0) ? -int'(v) : int'(v);
        if (frame_end) begin
          want = acc; acc = 0; pending = 1; frames++;
        end
        k = (k + 1) % L;
      end
    end
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
