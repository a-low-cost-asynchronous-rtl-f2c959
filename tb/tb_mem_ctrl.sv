// Self-checking testbench for mem_ctrl.
// 1. Capture: the ADC code is the low byte of a 3*edge counter, so the
//    3072 stored samples must step by exactly 3 (mod 256) from address to
//    address; checked through the host port. A second capture with a
//    step of 7 must overwrite the first; cap_done must come after
//    3072 sampling clocks.
// 2. tau writes of random values, then bursts over random ranges: each
//    pair must match the model, rd_valid must start two cycles after
//    rd_start, count last-first+1 pairs, and rd_end must mark the last.
`timescale 1ns/1ps
module tb_mem_ctrl;
  import eyerec_pkg::*;
  logic sys_clk = 0, samp_clk = 0, rst_n = 1;
  logic cap_start = 0, cap_done;
  y_t adc_data = 0;
  logic tau_we = 0; addr_t tau_addr = 0; tau_t tau_wdata = 0;
  logic rd_start = 0; addr_t rd_first = 0, rd_last = 0;
  logic rd_valid, rd_end; tau_t rd_tau; y_t rd_y;
  addr_t host_addr = 0; tau_t host_tau; y_t host_y;
  int checks = 0, failures = 0;
  int unsigned step = 3, sedge = 0;
  tau_t tau_model [3072];
  y_t   y_model   [3072];

  mem_ctrl dut (.*);

  always #6.667 sys_clk = ~sys_clk;
  always #2.479 samp_clk = ~samp_clk;
  always @(posedge samp_clk) begin
    sedge++;
    #0.5 adc_data = y_t'(sedge * step);
  end

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic capture_and_check(int unsigned st);
    realtime t0;
    int unsigned bad = 0;
    step = st;
    @(negedge sys_clk) cap_start = 1; t0 = $realtime;
    @(negedge sys_clk) cap_start = 0;
    wait (cap_done);
    checks++;
    if ($realtime - t0 < 3072 * 4.958) begin
      failures++; $display("FAIL capture too fast");
    end
    @(negedge sys_clk);
    for (int a = 0; a < 3072; a++) begin
      host_addr = addr_t'(a);
      @(negedge sys_clk);
      y_model[a] = host_y;
      if (a > 0 && y_t'(y_model[a] - y_model[a-1]) != y_t'(st)) bad++;
    end
    checks++;
    if (bad != 0) begin failures++; $display("FAIL capture step %0d: %0d bad", st, bad); end
  endtask

  task automatic burst(int unsigned first, int unsigned last);
    int unsigned n = 0, lat = 0;
    logic seen_end = 0;
    @(negedge sys_clk) rd_start = 1; rd_first = addr_t'(first); rd_last = addr_t'(last);
    @(negedge sys_clk) rd_start = 0;
    lat = 1;
    while (!rd_valid) begin @(negedge sys_clk); lat++; end
    checks++;
    if (lat != 2) begin failures++; $display("FAIL burst latency %0d", lat); end
    while (rd_valid) begin
      checks++;
      if (rd_tau != tau_model[first + n] || rd_y != y_model[first + n]) begin
        failures++; $display("FAIL burst addr %0d", first + n);
      end
      if (rd_end) begin
        seen_end = 1;
        checks++;
        if (first + n != last) begin failures++; $display("FAIL rd_end early"); end
      end
      n++;
      @(negedge sys_clk);
    end
    checks++;
    if (n != last - first + 1 || !seen_end) begin
      failures++; $display("FAIL burst %0d..%0d gave %0d pairs", first, last, n);
    end
  endtask

  initial begin
    #1 rst_n = 0;
    #20 rst_n = 1;
    capture_and_check(3);
    capture_and_check(7);
    for (int a = 0; a < 3072; a++) begin
      @(negedge sys_clk) tau_we = 1; tau_addr = addr_t'(a); tau_wdata = tau_t'($urandom);
      tau_model[a] = tau_wdata;
    end
    @(negedge sys_clk) tau_we = 0;
    burst(0, 1023);
    burst(1024, 3071);
    repeat (5) begin
      int unsigned f = $urandom_range(0, 3000);
      burst(f, f + $urandom_range(0, 3071 - f));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
