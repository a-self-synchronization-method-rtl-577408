// tb_majority_circuit - exhaustive over all chip patterns against one B
// segment, and random segments: agree must be the number of equal chips,
// and maj must be +1 exactly when at least 3M/4 chips agree or at least
// 3M/4 disagree.
module tb_majority_circuit;
  localparam int K = 3, M = 1 << K;
  int checks = 0, failures = 0;
  logic [M-1:0] chips, b_seg;
  logic [$clog2(M+1)-1:0] agree;
  logic maj;
  int plus = 0, minus = 0;

  majority_circuit #(.K(K)) dut (.chips, .b_seg, .agree, .maj);

  task automatic check_one();
    int a = M - $countones(chips ^ b_seg);
    bit want = (4 * a > 3 * M) || (4 * (M - a) > 3 * M);
    #1;
    checks++;
    if (int'(agree) != a || maj !== want) begin
      failures++;
      $display("chips %b b %b: agree %0d maj %0d", chips, b_seg, agree, maj);
    end
    if (want) plus++; else minus++;
  endtask

  initial begin
    b_seg = 8'b1011_0010;
    for (int c = 0; c < (1 << M); c++) begin
      chips = M'(c);
      check_one();
    end
    for (int t = 0; t < 1000; t++) begin
      chips = M'($urandom);
      b_seg = M'($urandom);
      check_one();
    end
    checks++;
    if (plus == 0 || minus == 0) failures++;
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
