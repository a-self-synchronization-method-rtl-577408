// sscsc_top - SS-CSC link with self-synchronizing frame timing.
//
// Side by side: the transmitter, which sends one K+N bit word per frame of
// L*M chips, and the receiver, in which the frame synchronizer recovers the
// frame timing from the received chips alone and labels each chip for the
// correlator receiver.  The channel (transmission line) is not part of the
// design: tx_chip leaves the top, and the channel's chip samples come back
// in on rx_sample.  The two halves share only the clock and reset.
//
// Timing: the transmitter sends one chip per clock with tx_chip_en; the
// receiver takes one sample per clock with rx_valid and gives a word on
// out_word / out_valid four clocks after the sample that ends a frame as
// the synchronizer sees it.  frame_pulse, sync_dec, sync_hold, sync_renew and the racing counter
// counts sync_c1 / sync_c2 show the synchronizer at work (frame sync pulse,
// last decision, C1 full, timing renewal).
module sscsc_top #(
  parameter int unsigned K    = sscsc_pkg::DEF_K,
  parameter int unsigned N    = sscsc_pkg::DEF_N,
  parameter int unsigned MSTG = sscsc_pkg::DEF_M1,
  parameter int unsigned NSTG = sscsc_pkg::DEF_N2,
  parameter int unsigned SW   = sscsc_pkg::DEF_SW,
  localparam int unsigned L  = sscsc_pkg::constraint_len(N),
  localparam int unsigned SQ = (L > 1) ? $clog2(L) : 1
) (
  input  logic                 clk,
  input  logic                 rst,
  // transmitter
  input  logic                 tx_chip_en,
  input  logic [K+N-1:0]       src_word,
  output logic                 src_take,
  output logic                 tx_valid,
  output logic                 tx_chip,
  // receiver
  input  logic                 rx_valid,
  input  logic signed [SW-1:0] rx_sample,
  output logic                 out_valid,
  output logic [K+N-1:0]       out_word,
  output logic                 frame_pulse,
  output logic                 sync_dec,
  output logic                 sync_hold,
  output logic                 sync_renew,
  output logic [$clog2(MSTG+1)-1:0] sync_c1,
  output logic [$clog2(NSTG+1)-1:0] sync_c2
);
  sscsc_tx #(.K(K), .N(N)) u_tx (
    .clk, .rst, .chip_en(tx_chip_en), .src_word, .src_take, .tx_valid, .tx_chip
  );

  logic                 fs_valid, fs_code_end;
  logic signed [SW-1:0] fs_sample;
  logic [K-1:0]         fs_chip_idx;
  logic [SQ-1:0]        fs_seq_idx;

  frame_sync #(.K(K), .N(N), .MSTG(MSTG), .NSTG(NSTG), .SW(SW)) u_sync (
    .clk, .rst, .in_valid(rx_valid), .in_sample(rx_sample),
    .out_valid(fs_valid), .out_sample(fs_sample), .out_chip_idx(fs_chip_idx),
    .out_seq_idx(fs_seq_idx), .out_code_end(fs_code_end),
    .out_frame_end(frame_pulse), .dec(sync_dec), .hold(sync_hold),
    .renew(sync_renew), .c1(sync_c1), .c2(sync_c2)
  );

  sscsc_rx #(.K(K), .N(N), .SW(SW)) u_rx (
    .clk, .rst, .in_valid(fs_valid), .in_sample(fs_sample),
    .chip_idx(fs_chip_idx), .seq_idx(fs_seq_idx), .code_end(fs_code_end),
    .frame_end(frame_pulse), .out_valid, .out_word
  );
endmodule
