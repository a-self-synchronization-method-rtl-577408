// sscsc_rx - SS-CSC data receiver, driven by the frame synchronizer.
//
// Each received chip arrives labelled with its position in the frame (C4
// and C3 counts) and with the code / frame end pulses of the synchronizer.
// The chip is first multiplied by A(t) at that position (de-scrambling),
// then by each of the M orthogonal codes and integrated over one sequence
// (M correlators).  The magnitudes of the L correlations of a frame are
// summed per code and the largest sum decides the K code-select bits; the
// signs of the selected code's correlations give the N polarity bits.
//
// Timing: the word of a frame leaves on out_word with out_valid three
// clocks after the chip flagged frame_end (correlator, summation,
// demodulator registers).  The structure follows the document's receiver;
// the widths and the pipeline are this design's.
module sscsc_rx #(
  parameter int unsigned K  = sscsc_pkg::DEF_K,
  parameter int unsigned N  = sscsc_pkg::DEF_N,
  parameter int unsigned SW = sscsc_pkg::DEF_SW,
  localparam int unsigned L  = sscsc_pkg::constraint_len(N),
  localparam int unsigned M  = 1 << K,
  localparam int unsigned LM = L * M,
  localparam int unsigned SQ = (L > 1) ? $clog2(L) : 1,
  localparam int unsigned PW = (LM > 1) ? $clog2(LM) : 1,
  localparam int unsigned DW = SW + 1,         // de-scrambled sample
  localparam int unsigned VW = DW + K + 1,     // correlation
  localparam int unsigned WS = VW + $clog2(L + 1)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic signed [SW-1:0] in_sample,
  input  logic [K-1:0]         chip_idx,
  input  logic [SQ-1:0]        seq_idx,
  input  logic                 code_end,
  input  logic                 frame_end,
  output logic                 out_valid,
  output logic [K+N-1:0]       out_word
);
  // de-scrambling by A(t)
  logic [PW-1:0] pos;
  logic          a_chip;
  logic signed [DW-1:0] desp;
  always_comb pos = PW'(32'(seq_idx) * M + 32'(chip_idx));
  a_code_gen #(.K(K), .L(L)) u_a (.pos, .chip(a_chip));
  always_comb desp = a_chip ? -DW'(in_sample) : DW'(in_sample);

  // frame end and sequence number travel with the correlator outputs
  logic          v_last;
  logic [SQ-1:0] v_seq;
  always_ff @(posedge clk)
    if (rst) begin
      v_last <= 1'b0;
      v_seq  <= '0;
    end else if (in_valid && code_end) begin
      v_last <= frame_end;
      v_seq  <= seq_idx;
    end

  logic [M-1:0]          v_valid, s_valid, v_sign;
  logic [M-1:0][WS-1:0]  sums;
  for (genvar i = 0; i < M; i++) begin : g_code
    logic signed [VW-1:0] v;
    correlator #(.K(K), .SW(DW), .IDX(i)) u_corr (
      .clk, .rst, .in_valid, .in_sample(desp), .chip_idx, .code_end,
      .v_valid(v_valid[i]), .v
    );
    abs_sum #(.VW(VW), .L(L)) u_sum (
      .clk, .rst, .v_valid(v_valid[i]), .v, .frame_end(v_last),
      .s_valid(s_valid[i]), .s(sums[i])
    );
    always_comb v_sign[i] = v[VW-1];
  end

  logic [K-1:0] sel;
  code_decision #(.K(K), .WS(WS)) u_cd (.sums, .sel);

  logic [L-1:0] d_bits;
  sign_detector #(.K(K), .L(L)) u_sd (
    .clk, .rst, .v_valid(v_valid[0]), .v_sign, .seq_idx(v_seq), .sel, .d_bits
  );

  data_demodulator #(.K(K), .N(N)) u_dm (
    .clk, .rst, .in_valid(&s_valid), .sel, .d_bits(N'(d_bits)),
    .out_valid, .out_word
  );
endmodule
