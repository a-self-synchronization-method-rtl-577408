// frame_sync - self-synchronizing frame synchronizer for the SS-CSC
// receiver.
//
// Frame timing is taken from the received signal itself, without a pilot.
// The differential detector multiplies each chip by the chip one sequence
// earlier; inside a correctly timed frame the code cancels and the products
// of sequence pairs equal B(t) = A(t) A(t-T) up to the data polarity.  The
// (L-1)M-stage shift register keeps the last (L-1) sequences of these
// chips.  At each frame sync pulse the (L-1) majority circuits compare them
// with B and the decision circuit votes: +1 when the timing looks right.
// The racing counters C1 (m) and C2 (n) then either hold the timing (C1
// fills first) or renew it (C2 fills first), in which case the chip
// counter C4 misses one chip so the frame boundary moves by one chip.
// C4 counts chips to M (code sync pulse) and C3 counts sequences to L
// (frame sync pulse).  All of this structure is the document's; the
// one-sample-per-chip stream and the output labelling are this design's.
//
// Interface: one received chip sample per clock with in_valid (chip timing
// is assumed established).  Every valid chip leaves one clock later on
// out_* together with its C4 and C3 counts, and with code_end / frame_end
// on the last chip of a sequence / frame as this synchronizer sees them.
// dec is the decision taken at the latest frame pulse; hold and renew are
// one-chip pulses of a full C1 or a timing renewal.
module frame_sync #(
  parameter int unsigned K    = sscsc_pkg::DEF_K,
  parameter int unsigned N    = sscsc_pkg::DEF_N,
  parameter int unsigned MSTG = sscsc_pkg::DEF_M1,
  parameter int unsigned NSTG = sscsc_pkg::DEF_N2,
  parameter int unsigned SW   = sscsc_pkg::DEF_SW,
  localparam int unsigned L  = sscsc_pkg::constraint_len(N),
  localparam int unsigned M  = 1 << K,
  localparam int unsigned LM = L * M,
  localparam int unsigned SQ = (L > 1) ? $clog2(L) : 1,
  localparam int unsigned W1 = $clog2(MSTG + 1),
  localparam int unsigned W2 = $clog2(NSTG + 1)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic signed [SW-1:0] in_sample,
  output logic                 out_valid,
  output logic signed [SW-1:0] out_sample,
  output logic [K-1:0]         out_chip_idx,
  output logic [SQ-1:0]        out_seq_idx,
  output logic                 out_code_end,
  output logic                 out_frame_end,
  output logic                 dec,
  output logic                 hold,
  output logic                 renew,
  output logic [W1-1:0]        c1,
  output logic [W2-1:0]        c2
);
  if (L < 2) begin : g_bad_l
    $error("frame_sync needs L >= 2 (N >= 2)");
  end

  localparam logic [(L-1)*M-1:0] B = ((L-1)*M)'(sscsc_pkg::b_code_bits(LM, M));

  // differential detector
  logic                   diff_chip;
  diff_detector #(.K(K), .SW(SW)) u_dd (
    .clk, .rst, .in_valid, .in_sample, .prod(), .diff_chip
  );

  // shift register of (L-1) sequences
  logic [(L-1)*M-1:0] sr_next;
  chip_shift_register #(.K(K), .L(L)) u_sr (
    .clk, .rst, .shift(in_valid), .din(diff_chip), .q(), .q_next(sr_next)
  );

  // (L-1) majority circuits and the decision circuit
  logic [L-2:0] maj;
  for (genvar s = 0; s < L - 1; s++) begin : g_maj
    majority_circuit #(.K(K)) u_maj (
      .chips(sr_next[s*M +: M]), .b_seg(B[s*M +: M]), .agree(), .maj(maj[s])
    );
  end

  logic dec_now;
  decision_circuit #(.L(L)) u_dec (.maj, .dec(dec_now));

  // counters C4 (gated by the renewal) and C3
  logic [K-1:0]  c4;
  logic [SQ-1:0] c3;
  logic          code_pulse, frame_pulse;
  sync_counter #(.MOD(M)) u_c4 (
    .clk, .rst, .en(in_valid && !renew), .cnt(c4), .wrap(code_pulse)
  );
  sync_counter #(.MOD(L)) u_c3 (
    .clk, .rst, .en(code_pulse), .cnt(c3), .wrap(frame_pulse)
  );

  // racing counters C1 / C2
  racing_counters #(.MSTG(MSTG), .NSTG(NSTG)) u_race (
    .clk, .rst, .chip_tick(in_valid), .frame_pulse, .dec(dec_now),
    .c1, .c2, .hold, .renew
  );

  always_ff @(posedge clk)
    if (rst) begin
      out_valid     <= 1'b0;
      out_sample    <= '0;
      out_chip_idx  <= '0;
      out_seq_idx   <= '0;
      out_code_end  <= 1'b0;
      out_frame_end <= 1'b0;
      dec           <= 1'b0;
    end else begin
      out_valid     <= in_valid;
      out_code_end  <= code_pulse;
      out_frame_end <= frame_pulse;
      if (in_valid) begin
        out_sample   <= in_sample;
        out_chip_idx <= c4;
        out_seq_idx  <= c3;
      end
      if (frame_pulse) dec <= dec_now;
    end
endmodule
