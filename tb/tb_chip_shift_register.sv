// tb_chip_shift_register - shifts random chips with random gaps and checks
// q and q_next against a model holding the last (L-1)M chips, oldest in
// bit 0.
module tb_chip_shift_register;
  localparam int K = 3, L = 3, M = 1 << K, W = (L - 1) * M;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, shift = 0, din = 0;
  logic [W-1:0] q, q_next, model = '0;

  chip_shift_register #(.K(K), .L(L)) dut (.clk, .rst, .shift, .din, .q, .q_next);

  always #5 clk = !clk;

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      shift = ($urandom % 3) != 0;
      din   = 1'($urandom);
      #1;
      checks++;
      if (q !== model || q_next !== (shift ? {din, model[W-1:1]} : model)) begin
        failures++;
        $display("t %0d: q %h model %h", t, q, model);
      end
      if (shift) model = {din, model[W-1:1]};
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
