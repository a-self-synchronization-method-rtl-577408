// diff_detector - differential detector of the frame synchronizer.
//
// Multiplies each received chip sample r(t) by the sample one sequence
// earlier, r(t - T), taken from an M-sample delay line (points (e) and (f)
// of the synchronizer).  Within a frame the selected code PN_i cancels, so
// the product carries d_s d_(s-1) A(t) A(t-T).  With one sample per chip
// the integration over a chip is the sample itself; the hard chip decision
// is the sign of the product (0 = +1, a zero product counts as +1; this
// design's choice).
//
// Timing: prod and diff_chip are combinational from in_sample and the delay
// line and are meaningful while in_valid is high; the delay line shifts on
// in_valid.  Reset clears the delay line, so the first M products are zero.
module diff_detector #(
  parameter int unsigned K  = sscsc_pkg::DEF_K,
  parameter int unsigned SW = sscsc_pkg::DEF_SW,
  localparam int unsigned M = 1 << K
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic signed [SW-1:0] in_sample,
  output logic signed [2*SW-1:0] prod,
  output logic                 diff_chip
);
  logic signed [SW-1:0] dly [M];

  always_ff @(posedge clk)
    if (rst) begin
      for (int i = 0; i < M; i++) dly[i] <= '0;
    end else if (in_valid) begin
      dly[0] <= in_sample;
      for (int i = 1; i < M; i++) dly[i] <= dly[i-1];
    end

  always_comb begin
    prod      = in_sample * dly[M-1];
    diff_chip = prod[2*SW-1];
  end
endmodule
