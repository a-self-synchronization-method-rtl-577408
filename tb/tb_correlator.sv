// tb_correlator - random samples over sequences of M chips (with random
// valid gaps); V must equal the sum of sample * PN_IDX(chip) over each
// sequence, with the code chip taken from the Hadamard recursion, and must
// appear one clock after the closing chip.  Two correlators (codes 0, 5).
module tb_correlator;
  localparam int K = 3, M = 1 << K, SW = 9, VW = SW + K + 1;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, in_valid = 0, code_end = 0;
  logic signed [SW-1:0] in_sample = '0;
  logic [K-1:0] chip_idx = '0;
  logic v_valid0, v_valid5;
  logic signed [VW-1:0] v0, v5;
  int acc0 = 0, acc5 = 0, want0, want5, seqs = 0;
  bit pending = 0;
  bit h [M][M];

  correlator #(.K(K), .SW(SW), .IDX(0)) d0 (.clk, .rst, .in_valid, .in_sample, .chip_idx, .code_end, .v_valid(v_valid0), .v(v0));
  correlator #(.K(K), .SW(SW), .IDX(5)) d5 (.clk, .rst, .in_valid, .in_sample, .chip_idx, .code_end, .v_valid(v_valid5), .v(v5));

  always #5 clk = !clk;

  initial begin
    int j;
    h[0][0] = 0;
    for (int n = 1; n < M; n *= 2)
      for (int r = 0; r < n; r++)
        for (int c = 0; c < n; c++) begin
          h[r][c+n] = h[r][c]; h[r+n][c] = h[r][c]; h[r+n][c+n] = !h[r][c];
        end
    j = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    while (seqs < 300) begin
      @(negedge clk);
      checks++;
      if (v_valid0 !== pending || v_valid5 !== pending) begin
        failures++;
        $display("v_valid timing");
      end
      if (pending) begin
        checks++;
        if (int'(v0) != want0 || int'(v5) != want5) begin
          failures++;
          $display("seq %0d: v0 %0d/%0d v5 %0d/%0d", seqs, v0, want0, v5, want5);
        end
      end
      pending = 0;
      in_valid  = ($urandom % 4) != 0;
      in_sample = SW'($urandom);
      chip_idx  = K'(j);
      code_end  = (j == M - 1);
      if (in_valid) begin
        acc0 += h[0][j] ? -int'(in_sample) : int'(in_sample);
        acc5 += h[5][j] ? -int'(in_sample) : int'(in_sample);
        if (code_end) begin
          want0 = acc0; want5 = acc5; acc0 = 0; acc5 = 0;
          pending = 1;
          seqs++;
        end
        j = (j + 1) % M;
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
