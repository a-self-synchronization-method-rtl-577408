// sscsc_tx - SS-CSC transmitter.
//
// Each frame of L = N sequences (L*M chips) carries one K+N bit word.  The
// data converter splits it into a code index i and N polarity bits d; every
// chip of sequence s is S = d_s * PN_i(chip) * A(frame chip), the product of
// the data bit (point (a)), the selected orthogonal code (point (b)) and the
// frame-long scrambling code A(t) (point (d)).  With one-bit chips each
// product is an XOR.
//
// Timing: one chip is produced per clock with chip_en high.  Counters give
// the chip number inside the sequence and the sequence number inside the
// frame.  On the last chip of a frame src_take pulses and src_word is
// latched for the next frame; the first frame after reset carries word 0
// (the handshake is this design's choice).  tx_chip is registered and
// appears one clock after chip_en with tx_valid.
module sscsc_tx #(
  parameter int unsigned K = sscsc_pkg::DEF_K,
  parameter int unsigned N = sscsc_pkg::DEF_N,
  localparam int unsigned L  = sscsc_pkg::constraint_len(N),
  localparam int unsigned M  = 1 << K,
  localparam int unsigned LM = L * M,
  localparam int unsigned SQ = (L > 1) ? $clog2(L) : 1,
  localparam int unsigned PW = (LM > 1) ? $clog2(LM) : 1
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           chip_en,
  input  logic [K+N-1:0] src_word,
  output logic           src_take,
  output logic           tx_valid,
  output logic           tx_chip
);
  logic [K-1:0]  chip_idx;
  logic [SQ-1:0] seq_idx;
  logic          last_chip, last_seq;

  always_comb begin
    last_chip = (32'(chip_idx) == M - 1);
    last_seq  = (32'(seq_idx) == L - 1);
    src_take  = chip_en && last_chip && last_seq;
  end

  always_ff @(posedge clk)
    if (rst) begin
      chip_idx <= '0;
      seq_idx  <= '0;
    end else if (chip_en) begin
      chip_idx <= chip_idx + 1'b1;          // wraps at M = 2^K
      if (last_chip) seq_idx <= last_seq ? '0 : seq_idx + 1'b1;
    end

  // data converter
  logic [K-1:0] sel;
  logic         d_bit;
  data_converter #(.K(K), .N(N)) u_conv (
    .clk, .rst, .load(src_take), .src_word, .seq_idx, .sel, .d_bit
  );

  // PNG 1 .. PNG M and the code selector
  logic [M-1:0] codes;
  for (genvar i = 0; i < M; i++) begin : g_png
    walsh_png #(.K(K), .IDX(i)) u_png (.chip_idx, .chip(codes[i]));
  end

  logic code_chip;
  code_selector #(.K(K)) u_sel (.codes, .sel, .chip(code_chip));

  // PN sequence A(t)
  logic [PW-1:0] pos;
  logic          a_chip;
  always_comb pos = PW'(32'(seq_idx) * M + 32'(chip_idx));
  a_code_gen #(.K(K), .L(L)) u_a (.pos, .chip(a_chip));

  always_ff @(posedge clk)
    if (rst) begin
      tx_valid <= 1'b0;
      tx_chip  <= 1'b0;
    end else begin
      tx_valid <= chip_en;
      if (chip_en) tx_chip <= d_bit ^ code_chip ^ a_chip;   // (c) then (d)
    end
endmodule
