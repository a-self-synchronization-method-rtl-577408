// data_converter - splits each source word into code selection and polarity
// data.
//
// A word has K + N bits: the upper K select one of the M = 2^K spreading
// codes for the whole frame, the lower N are the data d(t) that set the
// polarity of the selected code, one bit per sequence, most significant bit
// first (this bit order is this design's choice).  The word is latched when
// load is high (the transmitter raises it on the last chip of a frame); sel
// and d_bit are combinational from the latched word and seq_idx.  Reset
// clears the word.  0 on d_bit stands for +1.
module data_converter #(
  parameter int unsigned K = sscsc_pkg::DEF_K,
  parameter int unsigned N = sscsc_pkg::DEF_N,
  localparam int unsigned L  = sscsc_pkg::constraint_len(N),
  localparam int unsigned SQ = (L > 1) ? $clog2(L) : 1
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           load,
  input  logic [K+N-1:0] src_word,
  input  logic [SQ-1:0]  seq_idx,
  output logic [K-1:0]   sel,
  output logic           d_bit
);
  logic [K+N-1:0] word;

  always_ff @(posedge clk)
    if (rst)       word <= '0;
    else if (load) word <= src_word;

  always_comb begin
    sel   = word[K+N-1 -: K];
    d_bit = (32'(seq_idx) < N) ? word[N-1-32'(seq_idx)] : 1'b0;
  end
endmodule
