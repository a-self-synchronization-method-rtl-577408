// data_demodulator - data demodulator of the SS-CSC receiver.
//
// Rebuilds the K+N bit word of a frame from the decided code index (upper
// K bits) and the N polarity bits (lower bits, first sequence most
// significant), the inverse of the transmitter's data converter.  The word
// is registered on in_valid and leaves with out_valid one clock later.
module data_demodulator #(
  parameter int unsigned K = sscsc_pkg::DEF_K,
  parameter int unsigned N = sscsc_pkg::DEF_N
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           in_valid,
  input  logic [K-1:0]   sel,
  input  logic [N-1:0]   d_bits,
  output logic           out_valid,
  output logic [K+N-1:0] out_word
);
  always_ff @(posedge clk)
    if (rst) begin
      out_valid <= 1'b0;
      out_word  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_word <= {sel, d_bits};
    end
endmodule
