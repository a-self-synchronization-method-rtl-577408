// tb_diff_detector - feeds random samples with random valid gaps and checks
// the product with the sample M valid chips earlier, and its sign chip
// (1 = negative product), against a queue model.
module tb_diff_detector;
  localparam int K = 3, M = 1 << K, SW = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, in_valid = 0;
  logic signed [SW-1:0]   in_sample = '0;
  logic signed [2*SW-1:0] prod;
  logic diff_chip;
  int   hist [$];
  int   neg = 0, pos = 0;

  diff_detector #(.K(K), .SW(SW)) dut (.clk, .rst, .in_valid, .in_sample, .prod, .diff_chip);

  always #5 clk = !clk;

  initial begin
    repeat (M) hist.push_back(0);
    repeat (2) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      in_valid  = ($urandom % 3) != 0;
      in_sample = SW'($urandom);
      #1;
      if (in_valid) begin
        int want;
        want = int'(in_sample) * hist[0];
        checks++;
        if (int'(prod) != want || diff_chip !== (want < 0)) begin
          failures++;
          $display("sample %0d x %0d: got %0d/%0d", in_sample, hist[0], prod, diff_chip);
        end
        if (want < 0) neg++; else if (want > 0) pos++;
        void'(hist.pop_front());
        hist.push_back(int'(in_sample));
      end
    end
    checks++;
    if (neg == 0 || pos == 0) failures++;
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
