// correlator - one of the M correlators of the SS-CSC receiver.
//
// Multiplies the de-scrambled received chips by spreading code PN_IDX and
// integrates over one sequence T, then dumps: on the chip flagged code_end
// the full sum V leaves on v with v_valid and the integrator restarts.
// With +1/-1 code chips the multiplier is a conditional negation.  The
// integrate-and-dump structure is the document's; the Walsh code and the
// widths are this design's.
//
// Timing: inputs are taken while in_valid is high; v and v_valid are
// registered, one clock after the closing chip.  |v| <= M * 2^(SW-1).
module correlator #(
  parameter int unsigned K   = sscsc_pkg::DEF_K,
  parameter int unsigned SW  = sscsc_pkg::DEF_SW + 1,
  parameter int unsigned IDX = 0,
  localparam int unsigned VW = SW + K + 1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic signed [SW-1:0] in_sample,
  input  logic [K-1:0]         chip_idx,
  input  logic                 code_end,
  output logic                 v_valid,
  output logic signed [VW-1:0] v
);
  logic               pn;
  logic signed [VW-1:0] term, acc;

  walsh_png #(.K(K), .IDX(IDX)) u_pn (.chip_idx, .chip(pn));

  always_comb term = pn ? -VW'(in_sample) : VW'(in_sample);

  always_ff @(posedge clk)
    if (rst) begin
      acc     <= '0;
      v       <= '0;
      v_valid <= 1'b0;
    end else begin
      v_valid <= in_valid && code_end;
      if (in_valid) begin
        if (code_end) begin
          v   <= acc + term;
          acc <= '0;
        end else begin
          acc <= acc + term;
        end
      end
    end
endmodule
