// code_selector - the spreading-code selector of the transmitter.
//
// Passes on the current chip of the one of the M code generators that the K
// code-select bits name.  The document gives only its function; a
// multiplexer is the simplest circuit that does it.  Combinational.
module code_selector #(
  parameter int unsigned K = sscsc_pkg::DEF_K,
  localparam int unsigned M = 1 << K
) (
  input  logic [M-1:0] codes,
  input  logic [K-1:0] sel,
  output logic         chip
);
  always_comb chip = codes[sel];
endmodule
