// tb_walsh_png - checks the orthogonal code generators.
//
// Builds the M x M Hadamard matrix by the recursive doubling rule
// H(2n) = [H H; H -H] and compares every chip of all M generators with it,
// then checks that every pair of codes is orthogonal.
module tb_walsh_png;
  localparam int K = 3, M = 1 << K;
  int checks = 0, failures = 0;

  logic [K-1:0] idx;
  logic [M-1:0] chip;
  for (genvar i = 0; i < M; i++) begin : g
    walsh_png #(.K(K), .IDX(i)) dut (.chip_idx(idx), .chip(chip[i]));
  end

  bit h [M][M];
  initial begin
    h[0][0] = 0;
    for (int n = 1; n < M; n *= 2)
      for (int r = 0; r < n; r++)
        for (int c = 0; c < n; c++) begin
          h[r][c+n]   = h[r][c];
          h[r+n][c]   = h[r][c];
          h[r+n][c+n] = !h[r][c];
        end
    for (int j = 0; j < M; j++) begin
      idx = K'(j);
      #1;
      for (int i = 0; i < M; i++) begin
        checks++;
        if (chip[i] !== h[i][j]) begin
          failures++;
          $display("code %0d chip %0d: got %0d want %0d", i, j, chip[i], h[i][j]);
        end
      end
    end
    for (int a = 0; a < M; a++)
      for (int b = a + 1; b < M; b++) begin
        int corr = 0;
        for (int j = 0; j < M; j++) begin
          idx = K'(j);
          #1;
          corr += (chip[a] == chip[b]) ? 1 : -1;
        end
        checks++;
        if (corr != 0) begin
          failures++;
          $display("codes %0d and %0d not orthogonal (%0d)", a, b, corr);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
