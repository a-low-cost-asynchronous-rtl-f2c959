// Self-checking testbench for lambda_estimator.
// Drives the two subrate clocks directly with chosen periods Ts and Td.
// Counting 1024 sampling-subrate edges leaves mod(N_data, 1024) in the
// data counter: the estimate must equal (within one, for the latch
// timing) the number of data-subrate edges the testbench counts in that
// window, mod 1024, and lie within the window error (up to Ts/Td counts
// short) of the ideal 1024 * frac(Ts / Td). Several period pairs are
// tried; done must arrive soon after the 1024th sampling-subrate edge.
`timescale 1ns/1ps
module tb_lambda_estimator;
  logic samp_sub = 1'b0, data_sub = 1'b0, sys_clk = 1'b0, clr = 1'b0, enable = 1'b0;
  logic [9:0] clock_count, data_count, lambda_est;
  logic data_overflow, done;
  int checks = 0, failures = 0;
  realtime ts = 634.69, td = 12.8;
  int unsigned sedges;

  lambda_estimator dut (.*);

  always #6.667 sys_clk = ~sys_clk;
  always begin #(ts / 2) samp_sub = ~samp_sub; end
  always begin #(td / 2) data_sub = ~data_sub; end
  always @(posedge samp_sub) if (enable) sedges++;
  // data edges seen by the testbench inside the counting window
  int unsigned dedges;
  always @(posedge data_sub) if (enable && sedges < 1024) dedges++;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(realtime ts_i, realtime td_i);
    real ratio, frac_exp;
    int exp_cnt, diff;
    realtime t_ovf;
    ts = ts_i; td = td_i;
    #1 clr = 1'b1; enable = 1'b0; sedges = 0; dedges = 0;
    #100 clr = 1'b0;
    #3 enable = 1'b1;
    wait (sedges == 1024);
    t_ovf = $realtime;
    wait (done);
    ratio    = ts / td;
    frac_exp = ratio - $floor(ratio);
    // exact: data edges inside the window, mod 1024 (latch may be off by one)
    diff = int'(lambda_est) - int'(dedges % 1024);
    if (diff > 512) diff -= 1024;
    if (diff < -512) diff += 1024;
    checks++;
    if (diff > 1 || diff < -1) begin
      failures++;
      $display("FAIL ts=%0f td=%0f est=%0d, %0d data edges in window", ts, td, lambda_est, dedges);
    end
    // against the ideal fraction: the window spans 1023..1024 sampling
    // periods, so the count may be short by up to ts/td
    exp_cnt = int'(frac_exp * 1024.0);
    diff = exp_cnt - int'(lambda_est);
    if (diff > 512) diff -= 1024;
    if (diff < -512) diff += 1024;
    checks++;
    if (diff < -2 || real'(diff) > ratio + 2.0) begin
      failures++;
      $display("FAIL ts=%0f td=%0f est=%0d ideal %0d", ts, td, lambda_est, exp_cnt);
    end
    // done within one data subrate period plus synchroniser cycles
    checks++;
    if ($realtime - t_ovf > td + 5 * 13.334) begin
      failures++; $display("FAIL done late by %0f ns", $realtime - t_ovf);
    end
    checks++;
    if (clock_count != 0) begin
      failures++; $display("FAIL sample counter not stopped at full count");
    end
    @(posedge sys_clk);
    enable = 1'b0;
  endtask

  initial begin
    run(634.69, 12.80);     // 201.67 MHz/128 against ~10 Gb/s/128
    run(634.69, 80.00);     // 1 Gb/s data
    run(634.69, 20.13);
    run(500.00, 61.31);
    run(700.00, 11.11);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
