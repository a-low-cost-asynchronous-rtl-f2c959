// subrate_extractor: derives two low-rate square waves, one from the link
// data and one from the undersampling clock, whose frequency ratio keeps
// the aliased fraction lambda = mod(f_data, f_sample) / f_sample.
//
// The data chain has two stages fewer than the clock chain because random
// data has a 0->1 transition on only one bit in four, which already acts
// as a divide by 4. With the defaults (5 and 7 stages) both outputs are
// the inputs' rates divided by 128. In the reference design the first
// data stage is a high-sensitivity CML divider followed by a CML to CMOS
// converter; here data_in is the level-converted digital data and every
// stage is a logic flip-flop.
module subrate_extractor #(
  parameter int unsigned DATA_DIV_STAGES = 5,
  parameter int unsigned CLK_DIV_STAGES  = 7
) (
  input  logic data_in,
  input  logic samp_clk,
  input  logic rst_n,
  output logic data_sub,
  output logic samp_sub
);

  freq_divider #(.STAGES(DATA_DIV_STAGES)) u_data_div (
    .clk_in(data_in), .rst_n(rst_n), .clk_out(data_sub));

  freq_divider #(.STAGES(CLK_DIV_STAGES)) u_clk_div (
    .clk_in(samp_clk), .rst_n(rst_n), .clk_out(samp_sub));

endmodule
