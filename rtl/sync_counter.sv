// sync_counter - counter C4 (chips per sequence) or C3 (sequences per frame)
// of the frame synchronizer.
//
// Counts enabled clocks from 0; the enable that brings the count to MOD
// raises wrap (the code sync pulse for C4, the frame sync pulse for C3) and
// the counter resets itself to 0.  The gated clock of the document's
// counter C4 becomes the enable en.  wrap is combinational; the count is
// registered.  Reset clears the count.
module sync_counter #(
  parameter int unsigned MOD = 1 << sscsc_pkg::DEF_K,
  localparam int unsigned CW = (MOD > 1) ? $clog2(MOD) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  output logic [CW-1:0] cnt,
  output logic          wrap
);
  always_comb wrap = en && (32'(cnt) == MOD - 1);

  always_ff @(posedge clk)
    if (rst)       cnt <= '0;
    else if (wrap) cnt <= '0;
    else if (en)   cnt <= cnt + 1'b1;
endmodule
