// racing_counters - counters C1 and C2 of the frame synchronizer and the
// gates between them.
//
// At every frame sync pulse C2 counts, and C1 counts if the decision
// circuit says +1.  C1 (m stages) retains the frame timing, C2 (n stages,
// m < n) renews it: whichever reaches its full count first wins the race.
// A full C1 raises hold; a full C2 with C1 not full raises renew, which
// stops one chip clock of C4 and so moves the frame timing by one chip.
// Either full count resets both counters one chip interval later, through
// the OR gate and the Tc delay; the full state therefore lasts one chip.
// These connections are those of the document's block diagram.
//
// chip_tick marks each chip interval; frame_pulse and dec are sampled
// when chip_tick is high.  hold and renew are combinational from the
// counts.
module racing_counters #(
  parameter int unsigned MSTG = sscsc_pkg::DEF_M1,   // m
  parameter int unsigned NSTG = sscsc_pkg::DEF_N2,   // n
  localparam int unsigned W1 = $clog2(MSTG + 1),
  localparam int unsigned W2 = $clog2(NSTG + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          chip_tick,
  input  logic          frame_pulse,
  input  logic          dec,
  output logic [W1-1:0] c1,
  output logic [W2-1:0] c2,
  output logic          hold,
  output logic          renew
);
  logic c1_full, c2_full, clr;

  always_comb begin
    c1_full = (32'(c1) == MSTG);
    c2_full = (32'(c2) == NSTG);
    clr     = c1_full || c2_full;        // OR gate, reset after Tc
    hold    = c1_full;
    renew   = c2_full && !c1_full;       // AND with inverted C1 output
  end

  always_ff @(posedge clk)
    if (rst) begin
      c1 <= '0;
      c2 <= '0;
    end else if (chip_tick) begin
      if (clr) begin
        c1 <= '0;
        c2 <= '0;
      end else if (frame_pulse) begin
        c2 <= c2 + 1'b1;
        if (dec) c1 <= c1 + 1'b1;
      end
    end

  initial assert (MSTG >= 1 && MSTG < NSTG)
    else $error("racing counters need 1 <= m < n");
endmodule
