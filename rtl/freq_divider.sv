// freq_divider: ripple chain of divide-by-2 stages.
//
// Each stage is a D flip-flop whose inverted output is fed back to its D
// input, clocked by the previous stage's output; the first stage is
// clocked by clk_in. STAGES stages divide a clock by 2^STAGES. Fed with
// random NRZ data, the first stage toggles on every 0->1 transition (one
// bit in four on average), so the output approaches a square wave at
// f_bit / (4 * 2^STAGES): this is the subrate extraction the design relies
// on. The stage structure is the reference design's CMOS divider; the
// asynchronous active-low reset is an addition of this implementation so
// that the chain starts in a known state.
module freq_divider #(
  parameter int unsigned STAGES = 7
) (
  input  logic clk_in,
  input  logic rst_n,
  output logic clk_out
);

  logic [STAGES:0] q;
  assign q[0] = clk_in;

  for (genvar s = 1; s <= STAGES; s++) begin : g_stage
    always_ff @(posedge q[s-1] or negedge rst_n) begin
      if (!rst_n) q[s] <= 1'b0;
      else        q[s] <= ~q[s];
    end
  end

  assign clk_out = q[STAGES];

endmodule
