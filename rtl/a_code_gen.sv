// a_code_gen - the scrambling sequence A(t) of period L*M chips.
//
// A(t) multiplies the transmitted signal so that the frame timing can be
// recognised (it makes B(t) = A(t) A(t-T) a known pattern).  The same
// generator de-scrambles in the receiver, indexed by the synchronizer's
// frame position.  The document does not give the sequence; this design
// takes the first L*M bits of a 10-stage maximal LFSR (see sscsc_pkg) and
// holds them as a constant table.  Combinational: chip = A[pos], 0 = +1.
module a_code_gen #(
  parameter int unsigned K = sscsc_pkg::DEF_K,
  parameter int unsigned L = sscsc_pkg::constraint_len(sscsc_pkg::DEF_N),
  localparam int unsigned M  = 1 << K,
  localparam int unsigned LM = L * M,
  localparam int unsigned PW = (LM > 1) ? $clog2(LM) : 1
) (
  input  logic [PW-1:0] pos,
  output logic          chip
);
  localparam logic [LM-1:0] A = LM'(sscsc_pkg::a_code_bits(LM));

  always_comb chip = (32'(pos) < LM) ? A[pos] : 1'b0;
endmodule
