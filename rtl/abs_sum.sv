// abs_sum - absolute-value and summation circuit behind one correlator.
//
// Adds the magnitudes |V| of the correlator outputs of all L sequences of a
// frame, ignoring their sign (the sign carries the data), so the summed
// energy tells which code was sent.  The V flagged frame_end closes the
// frame: the total leaves on s with s_valid one clock later and the sum
// restarts.  Structure as in the document; widths are this design's.
module abs_sum #(
  parameter int unsigned VW = sscsc_pkg::DEF_SW + sscsc_pkg::DEF_K + 2,
  parameter int unsigned L  = sscsc_pkg::constraint_len(sscsc_pkg::DEF_N),
  localparam int unsigned WS = VW + $clog2(L + 1)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 v_valid,
  input  logic signed [VW-1:0] v,
  input  logic                 frame_end,
  output logic                 s_valid,
  output logic [WS-1:0]        s
);
  logic [WS-1:0] mag, sum;

  always_comb mag = v[VW-1] ? WS'(-v) : WS'(v);

  always_ff @(posedge clk)
    if (rst) begin
      sum     <= '0;
      s       <= '0;
      s_valid <= 1'b0;
    end else begin
      s_valid <= v_valid && frame_end;
      if (v_valid) begin
        if (frame_end) begin
          s   <= sum + mag;
          sum <= '0;
        end else begin
          sum <= sum + mag;
        end
      end
    end
endmodule
