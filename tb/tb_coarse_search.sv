// Self-checking testbench for coarse_search, run against the real memory
// controller, tau calculator and eye finder (the module's normal
// surroundings). The sample store is filled from a behavioural eye with a
// known lambda; the search starts from estimates at several distances.
// Checks: an open eye is found; the accepted lambda lies on the search
// grid (initial + k * 2^-11) with the trial count the alternating order
// implies (k > 0 -> 2k trials, k < 0 -> 2|k| + 1); the result is within
// 2^-10 of the true lambda; the run takes trials x (3072 + 1024 + ~50)
// cycles; the search moved towards the true value. Five starting errors
// are tried (+7e-3, -7e-3, +15e-3, -12e-3, 0). With a noise-only input and
// MAX_TRIAL = 16 the search must fail after exactly 16 trials and return
// the initial lambda.
`timescale 1ns/1ps
module tb_coarse_search;
  import eyerec_pkg::*;
  logic clk = 0, samp_clk = 0, rst_n = 1;
  int checks = 0, failures = 0;

  // environment
  logic cap_start = 0, cap_done;
  y_t adc_data;
  logic tau_we; addr_t tau_addr; tau_t tau_wdata;
  logic rd_start, rd_valid, rd_end; addr_t rd_first, rd_last; tau_t rd_tau; y_t rd_y;
  tau_t host_tau; y_t host_y;
  logic tau_start, tau_done; lambda_t tau_lambda;
  logic eye_start, eye_done; addr_t eye_first, eye_last; eye_result_t eye_res;
  real lam_true = 0.58601712, ph0 = 0.2;
  logic noise_only = 0;

  // DUTs: default parameters and a short one for the failure case
  logic start = 0, start2 = 0;
  lambda_t lambda_init = '0;
  logic d1_tau_start, d1_eye_start, d1_done, d1_fail; lambda_t d1_tau_lambda, d1_lambda;
  logic d2_tau_start, d2_eye_start, d2_done, d2_fail; lambda_t d2_tau_lambda, d2_lambda;
  addr_t d1_ef, d1_el, d2_ef, d2_el;
  logic [15:0] d1_trials, d2_trials;

  coarse_search dut (
    .clk(clk), .rst_n(rst_n), .start(start), .lambda_init(lambda_init),
    .tau_start(d1_tau_start), .tau_lambda(d1_tau_lambda), .tau_done(tau_done),
    .eye_start(d1_eye_start), .eye_first(d1_ef), .eye_last(d1_el),
    .eye_done(eye_done), .eye_res(eye_res),
    .done(d1_done), .fail(d1_fail), .lambda_out(d1_lambda), .trials(d1_trials));

  coarse_search #(.MAX_TRIAL(16)) dut_short (
    .clk(clk), .rst_n(rst_n), .start(start2), .lambda_init(lambda_init),
    .tau_start(d2_tau_start), .tau_lambda(d2_tau_lambda), .tau_done(tau_done),
    .eye_start(d2_eye_start), .eye_first(d2_ef), .eye_last(d2_el),
    .eye_done(eye_done), .eye_res(eye_res),
    .done(d2_done), .fail(d2_fail), .lambda_out(d2_lambda), .trials(d2_trials));

  logic use2 = 0;
  assign tau_start  = use2 ? d2_tau_start  : d1_tau_start;
  assign tau_lambda = use2 ? d2_tau_lambda : d1_tau_lambda;
  assign eye_start  = use2 ? d2_eye_start  : d1_eye_start;
  assign eye_first  = use2 ? d2_ef : d1_ef;
  assign eye_last   = use2 ? d2_el : d1_el;

  mem_ctrl u_mem (.sys_clk(clk), .samp_clk(samp_clk), .rst_n(rst_n),
    .cap_start(cap_start), .cap_done(cap_done), .adc_data(adc_data),
    .tau_we(tau_we), .tau_addr(tau_addr), .tau_wdata(tau_wdata),
    .rd_start(rd_start), .rd_first(rd_first), .rd_last(rd_last),
    .rd_valid(rd_valid), .rd_tau(rd_tau), .rd_y(rd_y), .rd_end(rd_end),
    .host_addr(12'd0), .host_tau(host_tau), .host_y(host_y));
  tau_calc u_tau (.clk(clk), .rst_n(rst_n), .start(tau_start), .lambda(tau_lambda),
    .tau_we(tau_we), .tau_addr(tau_addr), .tau_wdata(tau_wdata), .done(tau_done));
  eye_finder u_eye (.clk(clk), .rst_n(rst_n), .start(eye_start), .first(eye_first),
    .last(eye_last), .hires(1'b0), .rd_start(rd_start), .rd_first(rd_first),
    .rd_last(rd_last), .rd_valid(rd_valid), .rd_tau(rd_tau), .rd_y(rd_y),
    .rd_end(rd_end), .done(eye_done), .result(eye_res));
  adc_eye_model u_adc (.samp_clk(samp_clk), .index(u_mem.waddr), .lam_true(lam_true),
    .ph0(ph0), .noise(3), .noise_only(noise_only), .adc_data(adc_data));

  always #6.667 clk = ~clk;
  always #2.479 samp_clk = ~samp_clk;
  int unsigned cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    #60_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic capture();
    @(negedge clk) cap_start = 1;
    @(negedge clk) cap_start = 0;
    wait (cap_done);
    @(negedge clk);
  endtask

  // one search from an estimate `offset` away from the true lambda
  task automatic search(real offset);
    real err, lo;
    int k, exp_trials;
    int unsigned c0;
    lambda_init = lambda_t'(int'($floor((lam_true + offset) * 1024.0))) << 8;
    @(negedge clk) start = 1; c0 = cyc;
    @(negedge clk) start = 0;
    wait (d1_done);
    err = real'(d1_lambda) / 262144.0 - lam_true;
    k = (int'(d1_lambda) - int'(lambda_init)) / 128;
    exp_trials = (k > 0) ? 2 * k : (k < 0 ? -2 * k + 1 : 1);
    $display("coarse: offset=%f init=%0d out=%0d trials=%0d err=%f", offset, lambda_init,
             d1_lambda, d1_trials, err);
    checks++;
    if (d1_fail) begin failures++; $display("FAIL coarse search failed"); end
    checks++;
    if ((int'(d1_lambda) - int'(lambda_init)) % 128 != 0 || int'(d1_trials) != exp_trials) begin
      failures++; $display("FAIL trial order: k=%0d trials=%0d", k, d1_trials);
    end
    checks++;
    if (err > 1.0 / 1024.0 || err < -1.0 / 1024.0) begin
      failures++; $display("FAIL coarse result off by %f", err);
    end
    checks++;
    if ((offset > 0.002 && k >= 0) || (offset < -0.002 && k <= 0)) begin
      failures++; $display("FAIL search went the wrong way: k=%0d", k);
    end
    checks++;
    lo = real'(d1_trials) * (3072.0 + 1024.0 + 32.0);
    if (real'(cyc - c0) < lo || real'(cyc - c0) > lo + real'(d1_trials) * 30.0) begin
      failures++; $display("FAIL %0d cycles for %0d trials", cyc - c0, d1_trials);
    end
  endtask

  initial begin
    #1 rst_n = 0;
    #30 rst_n = 1;
    capture();
    search(0.007);
    search(-0.007);
    search(0.015);
    search(-0.012);
    search(0.0);
    // no eye at all
    noise_only = 1;
    capture();
    use2 = 1;
    @(negedge clk) start2 = 1;
    @(negedge clk) start2 = 0;
    wait (d2_done);
    checks++;
    if (!d2_fail || d2_trials != 16) begin
      failures++; $display("FAIL noise: fail=%0b trials=%0d", d2_fail, d2_trials);
    end
    checks++;
    if (d2_lambda != lambda_init) begin
      failures++; $display("FAIL lambda after failure %0d, expected the initial %0d", d2_lambda, lambda_init);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
