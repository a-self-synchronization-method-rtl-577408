// tb_data_converter - loads random words and checks the code index and the
// polarity bit of every sequence (most significant data bit first), and
// that the word holds while load is low.
module tb_data_converter;
  localparam int K = 3, N = 3, L = N, SQ = $clog2(L);
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, load = 0;
  logic [K+N-1:0] src_word;
  logic [SQ-1:0]  seq_idx = '0;
  logic [K-1:0]   sel;
  logic           d_bit;

  data_converter #(.K(K), .N(N)) dut (.clk, .rst, .load, .src_word, .seq_idx, .sel, .d_bit);

  always #5 clk = !clk;

  initial begin
    logic [K+N-1:0] w;
    src_word = '1;
    @(posedge clk); #1;
    checks++;
    if (sel !== '0) failures++;      // reset clears the word
    rst = 0;
    for (int t = 0; t < 200; t++) begin
      w = (K+N)'($urandom);
      src_word = w; load = 1;
      @(posedge clk); #1;
      load = 0;
      src_word = ~w;                  // must not be taken
      @(posedge clk); #1;
      for (int s = 0; s < L; s++) begin
        seq_idx = SQ'(s);
        #1;
        checks++;
        if (sel !== w[K+N-1 -: K] || d_bit !== w[N-1-s]) begin
          failures++;
          $display("word %b seq %0d: sel %0d d %0d", w, s, sel, d_bit);
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
