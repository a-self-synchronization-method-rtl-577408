// walsh_png - one orthogonal spreading-code generator (PNG i of the
// transmitter).
//
// Gives chip chip_idx of code IDX.  The document asks only for M = 2^K
// orthogonal codes; this design uses the Walsh-Hadamard rows, chip j of code
// i = (-1)^popcount(i & j), so a generator is the parity of IDX & chip_idx.
// Purely combinational; 0 on chip stands for +1.
module walsh_png #(
  parameter int unsigned K   = sscsc_pkg::DEF_K,
  parameter int unsigned IDX = 1
) (
  input  logic [K-1:0] chip_idx,
  output logic         chip
);
  localparam logic [K-1:0] CODE = K'(IDX);

  always_comb chip = ^(CODE & chip_idx);
endmodule
