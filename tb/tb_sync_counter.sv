// tb_sync_counter - counts random enables for MOD = 8 (C4) and MOD = 3 (C3)
// and checks the count and that the pulse comes on every MOD-th enable.
module tb_sync_counter;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, en = 0;
  logic [2:0] cnt8;
  logic [1:0] cnt3;
  logic wrap8, wrap3;
  int n_en = 0, n8 = 0, n3 = 0;

  sync_counter #(.MOD(8)) c4 (.clk, .rst, .en, .cnt(cnt8), .wrap(wrap8));
  sync_counter #(.MOD(3)) c3 (.clk, .rst, .en, .cnt(cnt3), .wrap(wrap3));

  always #5 clk = !clk;

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      en = 1'($urandom);
      #1;
      checks++;
      if (int'(cnt8) != n_en % 8 || int'(cnt3) != n_en % 3 ||
          wrap8 !== (en && n_en % 8 == 7) || wrap3 !== (en && n_en % 3 == 2)) begin
        failures++;
        $display("after %0d enables: cnt %0d/%0d wrap %0d/%0d", n_en, cnt8, cnt3, wrap8, wrap3);
      end
      n8 += wrap8;
      n3 += wrap3;
      if (en) n_en++;
    end
    checks++;
    if (n8 != n_en / 8 || n3 != n_en / 3) failures++;
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
