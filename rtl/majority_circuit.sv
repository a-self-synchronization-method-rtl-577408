// majority_circuit - one of the (L-1) majority circuits of the frame
// synchronizer.
//
// Compares M stored differential chips with the matching M chips of
// B(t) = A(t) A(t-T) and counts the chips that agree.  When the frame
// timing is right, all M chips of a sequence pair equal B times
// d_s d_(s-1), i.e. B or its complement, so the circuit outputs +1 (maj = 1)
// when more than 3M/4 chips agree with B or more than 3M/4 disagree, and -1
// otherwise (for M = 8: at most one chip off).  The document's prose puts
// the threshold at "not less than 3M/4" for agreement only; its error-rate
// formula, on which its results rest, accepts both polarities and counts
// exactly M/4 or 3M/4 errors as a failure.  This circuit follows the
// formula.  Combinational.
module majority_circuit #(
  parameter int unsigned K = sscsc_pkg::DEF_K,
  localparam int unsigned M  = 1 << K,
  localparam int unsigned CW = $clog2(M + 1)
) (
  input  logic [M-1:0]  chips,
  input  logic [M-1:0]  b_seg,
  output logic [CW-1:0] agree,
  output logic          maj
);
  always_comb begin
    agree = '0;
    for (int j = 0; j < M; j++) agree += CW'(chips[j] == b_seg[j]);
    maj = (4 * 32'(agree) > 3 * M) || (4 * 32'(agree) < M);
  end
endmodule
