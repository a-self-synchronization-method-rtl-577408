// sign_detector - sign detector and decision of the SS-CSC receiver.
//
// The polarity of the selected code in each sequence carries one data bit,
// but which code was selected is known only at the end of the frame.  So
// the sign of every correlator output is stored for each of the L sequences
// (an L x M bit table written at v_valid, row seq_idx), and d_bits reads the
// column of the decided code sel: d_bits[L-1] is the first sequence, and a
// negative correlation gives bit 1.  Reading is combinational; reset clears
// the table.  Storing all signs is this design's way of meeting the
// document's order of decisions.
module sign_detector #(
  parameter int unsigned K = sscsc_pkg::DEF_K,
  parameter int unsigned L = sscsc_pkg::constraint_len(sscsc_pkg::DEF_N),
  localparam int unsigned M  = 1 << K,
  localparam int unsigned SQ = (L > 1) ? $clog2(L) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          v_valid,
  input  logic [M-1:0]  v_sign,
  input  logic [SQ-1:0] seq_idx,
  input  logic [K-1:0]  sel,
  output logic [L-1:0]  d_bits
);
  logic [L-1:0][M-1:0] signs;

  always_ff @(posedge clk)
    if (rst)                              signs <= '0;
    else if (v_valid && 32'(seq_idx) < L) signs[seq_idx] <= v_sign;

  always_comb
    for (int s = 0; s < L; s++) d_bits[L-1-s] = signs[s][sel];
endmodule
