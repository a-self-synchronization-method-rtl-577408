// chip_shift_register - the (L-1)M-stage shift register of the frame
// synchronizer.
//
// Stores the last (L-1) sequences of differential-detector chips.  A new
// chip enters at the top; q[0] is the oldest, so at the end of a correctly
// timed frame q[j] holds frame chip j + M and lines up with bit j of B(t).
// q_next shows the contents the register will have after the pending shift,
// so the decision for a frame can be taken on the chip that ends it (this
// design's choice).  Shifts on shift; reset clears it.
module chip_shift_register #(
  parameter int unsigned K = sscsc_pkg::DEF_K,
  parameter int unsigned L = sscsc_pkg::constraint_len(sscsc_pkg::DEF_N),
  localparam int unsigned W = (L - 1) * (1 << K)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         shift,
  input  logic         din,
  output logic [W-1:0] q,
  output logic [W-1:0] q_next
);
  always_comb q_next = shift ? {din, q[W-1:1]} : q;

  always_ff @(posedge clk)
    if (rst) q <= '0;
    else     q <= q_next;
endmodule
