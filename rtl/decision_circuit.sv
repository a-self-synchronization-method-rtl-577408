// decision_circuit - decision circuit of the frame synchronizer.
//
// Adds the (L-1) majority outputs, each +1 or -1, and outputs +1 (dec = 1)
// when the sum is not less than zero, as the document specifies.  The sum
// is formed as (number of +1) - (number of -1) >= 0.  Combinational.
module decision_circuit #(
  parameter int unsigned L = sscsc_pkg::constraint_len(sscsc_pkg::DEF_N),
  localparam int unsigned NW = $clog2(L) + 1
) (
  input  logic [L-2:0] maj,
  output logic         dec
);
  logic [NW-1:0] plus;

  always_comb begin
    plus = '0;
    for (int j = 0; j < L - 1; j++) plus += NW'(maj[j]);
    dec = (2 * 32'(plus) >= L - 1);
  end
endmodule
