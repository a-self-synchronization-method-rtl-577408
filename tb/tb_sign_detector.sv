// tb_sign_detector - writes random sign vectors for the L sequences of a
// frame, then reads the polarity bits for every possible selected code:
// bit L-1-s must be the sign stored for sequence s in that code's column.
module tb_sign_detector;
  localparam int K = 3, L = 3, M = 1 << K;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, v_valid = 0;
  logic [M-1:0] v_sign = '0;
  logic [1:0]   seq_idx = '0;
  logic [K-1:0] sel = '0;
  logic [L-1:0] d_bits;
  logic [M-1:0] model [L];

  sign_detector #(.K(K), .L(L)) dut (.clk, .rst, .v_valid, .v_sign, .seq_idx, .sel, .d_bits);

  always #5 clk = !clk;

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    for (int f = 0; f < 200; f++) begin
      for (int s = 0; s < L; s++) begin
        @(negedge clk);
        v_valid = 1; seq_idx = 2'(s); v_sign = M'($urandom);
        model[s] = v_sign;
        @(negedge clk);
        v_valid = 0; v_sign = ~v_sign;    // must not be written
      end
      for (int c = 0; c < M; c++) begin
        sel = K'(c);
        #1;
        checks++;
        for (int s = 0; s < L; s++)
          if (d_bits[L-1-s] !== model[s][c]) begin
            failures++;
            $display("frame %0d code %0d seq %0d", f, c, s);
            break;
          end
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
