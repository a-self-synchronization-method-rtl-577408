// code_decision - spreading-code decision of the SS-CSC receiver.
//
// Picks the largest of the M summed correlator magnitudes; its index is the
// K-bit code-select data.  A compare chain over the M inputs; on a tie the
// lower index wins (this design's choice).  Combinational.
module code_decision #(
  parameter int unsigned K  = sscsc_pkg::DEF_K,
  parameter int unsigned WS = 16,
  localparam int unsigned M = 1 << K
) (
  input  logic [M-1:0][WS-1:0] sums,
  output logic [K-1:0]         sel
);
  logic [WS-1:0] best;

  always_comb begin
    sel  = '0;
    best = sums[0];
    for (int i = 1; i < M; i++)
      if (sums[i] > best) begin
        best = sums[i];
        sel  = K'(i);
      end
  end
endmodule
