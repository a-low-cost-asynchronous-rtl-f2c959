// Self-checking testbench for fine_correct, in its normal surroundings
// (memory controller, tau calculator, eye finder), like a bench that
// bypasses the coarse search with a preset lambda.
// Case A: eye centre mid-period, lambda error +60/2^18: the direct
//         correction must be taken (wrapped = 0).
// Case B: eye centre crosses the period boundary between the two
//         groups, error -30/2^18: the direct reading closes the eye and
//         RECONSTRUCT_BAR must be used (wrapped = 1).
// Case C: high resolution groups (0..2047 / 1024..3071, 64 bins).
// Case D: no error: lambda must stay within 16/2^18, no wrap.
// Case E: high resolution, negative error.
// Case F: the mirror of B, error +30/2^18 with the eye crossing the
//         boundary downwards: wrap expected.
// In every case the final lambda must be within 16/2^18 of the true
// value (and closer than the preset when that was more than 16 off), the
// wrap flag must be as expected, and the tau store must hold the
// reconstruction with the returned lambda.
`timescale 1ns/1ps
module tb_fine_correct;
  import eyerec_pkg::*;
  logic clk = 0, samp_clk = 0, rst_n = 1;
  int checks = 0, failures = 0;

  logic cap_start = 0, cap_done;
  y_t adc_data;
  logic tau_we; addr_t tau_addr; tau_t tau_wdata;
  logic rd_start, rd_valid, rd_end; addr_t rd_first, rd_last; tau_t rd_tau; y_t rd_y;
  addr_t host_addr = 0; tau_t host_tau; y_t host_y;
  logic tau_start, tau_done; lambda_t tau_lambda;
  logic eye_done; eye_result_t eye_res;
  real lam_true = 0.58601712, ph0 = 0.2;
  logic hires = 0;

  logic start = 0, done, wrapped;
  lambda_t lambda_in = '0, lambda_out, fc_tau_lambda;
  addr_t g1f = 0, g1l = 1023, g2f = 1024, g2l = 2047;
  logic fc_tau_start, fc_eye_start; addr_t fc_ef, fc_el;
  logic tb_tau_start = 0; lambda_t tb_lambda = '0;

  fine_correct dut (.clk(clk), .rst_n(rst_n), .start(start), .lambda_in(lambda_in),
    .g1_first(g1f), .g1_last(g1l), .g2_first(g2f), .g2_last(g2l),
    .eye_start(fc_eye_start), .eye_first(fc_ef), .eye_last(fc_el),
    .eye_done(eye_done), .eye_res(eye_res),
    .tau_start(fc_tau_start), .tau_lambda(fc_tau_lambda), .tau_done(tau_done),
    .done(done), .wrapped(wrapped), .lambda_out(lambda_out));

  assign tau_start  = fc_tau_start | tb_tau_start;
  assign tau_lambda = tb_tau_start ? tb_lambda : fc_tau_lambda;

  mem_ctrl u_mem (.sys_clk(clk), .samp_clk(samp_clk), .rst_n(rst_n),
    .cap_start(cap_start), .cap_done(cap_done), .adc_data(adc_data),
    .tau_we(tau_we), .tau_addr(tau_addr), .tau_wdata(tau_wdata),
    .rd_start(rd_start), .rd_first(rd_first), .rd_last(rd_last),
    .rd_valid(rd_valid), .rd_tau(rd_tau), .rd_y(rd_y), .rd_end(rd_end),
    .host_addr(host_addr), .host_tau(host_tau), .host_y(host_y));
  tau_calc u_tau (.clk(clk), .rst_n(rst_n), .start(tau_start), .lambda(tau_lambda),
    .tau_we(tau_we), .tau_addr(tau_addr), .tau_wdata(tau_wdata), .done(tau_done));
  eye_finder u_eye (.clk(clk), .rst_n(rst_n), .start(fc_eye_start), .first(fc_ef),
    .last(fc_el), .hires(hires), .rd_start(rd_start), .rd_first(rd_first),
    .rd_last(rd_last), .rd_valid(rd_valid), .rd_tau(rd_tau), .rd_y(rd_y),
    .rd_end(rd_end), .done(eye_done), .result(eye_res));
  adc_eye_model u_adc (.samp_clk(samp_clk), .index(u_mem.waddr), .lam_true(lam_true),
    .ph0(ph0), .noise(3), .noise_only(1'b0), .adc_data(adc_data));

  always #6.667 clk = ~clk;
  always #2.479 samp_clk = ~samp_clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_case(string name, real ph, int err_units, bit hr, bit exp_wrap);
    lambda_t lam_t, lam0;
    int e0, e1, bad = 0;
    longint unsigned prod;
    ph0 = ph; hires = hr;
    if (hr) begin g1f = 0; g1l = 2047; g2f = 1024; g2l = 3071; end
    else    begin g1f = 0; g1l = 1023; g2f = 1024; g2l = 2047; end
    @(negedge clk) cap_start = 1;
    @(negedge clk) cap_start = 0;
    wait (cap_done);
    lam_t = lambda_t'(longint'(lam_true * 262144.0 + 0.5));
    lam0  = lam_t - lambda_t'(err_units);
    // preset reconstruction
    @(negedge clk) tb_tau_start = 1; tb_lambda = lam0;
    @(negedge clk) tb_tau_start = 0;
    wait (tau_done);
    @(negedge clk) start = 1; lambda_in = lam0;
    @(negedge clk) start = 0;
    wait (done);
    e0 = int'(lam_t) - int'(lam0);
    e1 = int'(lam_t) - int'(lambda_out);
    $display("%s: preset error %0d, final error %0d, wrapped=%0b", name, e0, e1, wrapped);
    checks++;
    if (e1 > 16 || e1 < -16 || (e0 * e0 > 256 && e1 * e1 >= e0 * e0)) begin
      failures++; $display("FAIL %s: final error %0d", name, e1);
    end
    checks++;
    if (wrapped != exp_wrap) begin failures++; $display("FAIL %s: wrapped=%0b", name, wrapped); end
    // tau store holds the final reconstruction
    @(negedge clk);
    for (int a = 0; a < 3072; a++) begin
      host_addr = addr_t'(a);
      @(negedge clk);
      prod = (longint'(a) * longint'(lambda_out)) % (64'd1 << 18);
      if (host_tau != tau_t'(prod >> 10)) bad++;
    end
    checks++;
    if (bad != 0) begin failures++; $display("FAIL %s: %0d tau values differ", name, bad); end
  endtask

  initial begin
    #1 rst_n = 0;
    #30 rst_n = 1;
    run_case("A direct", 0.05, 60, 1'b0, 1'b0);
    run_case("B wrap", 0.621, -30, 1'b0, 1'b1);
    run_case("C high resolution", 0.3, 20, 1'b1, 1'b0);
    run_case("D no error", 0.3, 0, 1'b0, 1'b0);
    run_case("E high resolution negative", 0.35, -12, 1'b1, 1'b0);
    run_case("F wrap downwards", 0.381, 30, 1'b0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
