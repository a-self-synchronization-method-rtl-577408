// tb_data_demodulator - random code indices and polarity bits; the word
// {sel, d_bits} must come out one clock later and hold between valids.
module tb_data_demodulator;
  localparam int K = 3, N = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, in_valid = 0;
  logic [K-1:0] sel = '0;
  logic [N-1:0] d_bits = '0;
  logic out_valid;
  logic [K+N-1:0] out_word, want = '0;
  bit pending = 0;

  data_demodulator #(.K(K), .N(N)) dut (.clk, .rst, .in_valid, .sel, .d_bits, .out_valid, .out_word);

  always #5 clk = !clk;

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      checks++;
      if (out_valid !== pending || out_word !== want) begin
        failures++;
        $display("t %0d: %b want %b", t, out_word, want);
      end
      in_valid = 1'($urandom);
      sel = K'($urandom);
      d_bits = N'($urandom);
      pending = in_valid;
      if (in_valid) want = {sel, d_bits};
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
