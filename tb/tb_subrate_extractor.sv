// Self-checking testbench for subrate_extractor.
// Sends PRBS15 data (one bit per 0.1 ns, 10 Gb/s) and a 4.9586 ns
// sampling clock. The data subrate must equal bit 4 of minus the count of
// data 0->1 transitions, the clock subrate bit 6 of minus the count of
// clock edges (the chains are ripple down-counters),
// and both subrates must run near 1/128 of their sources.
`timescale 1ps/1fs
module tb_subrate_extractor;
  logic data_in = 1'b0, samp_clk = 1'b0, rst_n = 1'b1;
  logic data_sub, samp_sub;
  int checks = 0, failures = 0;
  int unsigned rneg, sneg;
  int unsigned rises = 0, sedges = 0, dsub_edges = 0, bits = 0;
  logic [14:0] lfsr = 15'h1;

  subrate_extractor dut (.data_in(data_in), .samp_clk(samp_clk), .rst_n(rst_n),
                         .data_sub(data_sub), .samp_sub(samp_sub));

  always @(posedge data_sub) dsub_edges++;

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sampling clock and its check
  initial begin
    #1 rst_n = 1'b0;
    #9 rst_n = 1'b1;
    forever begin
      #2479.3 samp_clk = 1'b1; sedges++;
      #1 checks++;
      sneg = -sedges;
      if (samp_sub !== sneg[6]) begin
        failures++; $display("FAIL clock subrate after %0d edges", sedges);
      end
      #2478.3 samp_clk = 1'b0;
    end
  end

  initial begin
    #20;
    repeat (400000) begin
      logic nb;
      nb   = lfsr[14] ^ lfsr[13];
      lfsr = {lfsr[13:0], nb};
      if (!data_in && nb) rises++;
      data_in = nb; bits++;
      #50;
      checks++;
      rneg = -rises;
      if (data_sub !== rneg[4]) begin
        failures++; $display("FAIL data subrate after %0d rises", rises);
      end
      #50;
    end
    checks++;
    // PRBS 0->1 density 2^13/(2^15-1): one subrate edge per ~128 bits
    if (dsub_edges < bits / 128 - 40 || dsub_edges > bits / 128 + 40) begin
      failures++; $display("FAIL data subrate rate %0d for %0d bits", dsub_edges, bits);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
