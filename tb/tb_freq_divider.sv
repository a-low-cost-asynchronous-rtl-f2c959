// Self-checking testbench for freq_divider.
// Drives a clock and then random NRZ data into a 7-stage chain. After k
// rising input edges from reset the output must equal bit STAGES-1 of -k
// (each stage clocked by the previous Q: a ripple down-counter), checked after every edge; with random data the
// output rate must be about f_bit / (4 * 2^STAGES).
`timescale 1ns/1ps
module tb_freq_divider;
  localparam int unsigned STAGES = 7;
  logic clk_in = 1'b0, rst_n = 1'b1, clk_out;
  int checks = 0, failures = 0;
  int unsigned k = 0, kneg = 0, outs = 0, bits = 0;

  freq_divider #(.STAGES(STAGES)) dut (.clk_in(clk_in), .rst_n(rst_n), .clk_out(clk_out));

  always @(posedge clk_out) outs++;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    #4 rst_n = 1'b1;
    // periodic clock: exact ripple-counter behaviour
    repeat (1000) begin
      #2 clk_in = 1'b1; k++; kneg = -k;
      #2 clk_in = 1'b0;
      checks++;
      if (clk_out !== kneg[STAGES-1]) begin
        failures++;
        $display("FAIL edge %0d out=%0b", k, clk_out);
      end
    end
    // random data: count output edges
    rst_n = 1'b0; #1 rst_n = 1'b1; outs = 0;
    repeat (200000) begin
      #1 clk_in = $urandom_range(0, 1) == 1;
      bits++;
    end
    checks++;
    // expected bits / (4 * 128) rising output edges, allow 10 %
    if (outs < (bits / 512) * 9 / 10 || outs > (bits / 512) * 11 / 10) begin
      failures++;
      $display("FAIL random data: %0d output edges for %0d bits", outs, bits);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
