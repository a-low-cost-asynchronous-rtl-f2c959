// Self-checking testbench for main_fsm. The capture, estimator, coarse
// search and fine correction are played by the testbench itself, which
// answers each request after a random delay, so the sequencing is seen in
// isolation. Checks per run: busy / sh_enable / est_clr / est_enable
// levels in each phase, one start pulse per module, the estimate placed in
// the top 10 bits of the coarse search's initial lambda, lambda handed on
// from coarse to fine to fine, the fine group tables (0..1023 / 1024..2047
// at 32 bins, then 0..2047 / 1024..3071 at 64 bins), the shared-block
// multiplexer following the active phase (and the idle module masked off),
// and done / fail / lambda_out at the end. A second run has the coarse
// search fail: the fine phases must be skipped and fail must be set.
// Locked runs (use_locked high with start) must skip the estimator and
// the coarse search and start the fine correction from the previous
// lambda_out. A second instance with FINE_STAGES = 1, fed the same
// stimulus, must finish after the low resolution stage with its result.
`timescale 1ns/1ps
module tb_main_fsm;
  import eyerec_pkg::*;
  logic clk = 0, rst_n = 1;
  int checks = 0, failures = 0;

  logic start = 0, busy, done, fail, sh_enable, cap_start, est_clr, est_enable;
  logic cap_done = 0, est_done = 0;
  logic [EST_W-1:0] est_value = '0;
  logic cs_start, cs_done = 0, cs_fail = 0;
  lambda_t cs_lambda_init, cs_lambda = '0, cs_tau_lambda = '0;
  logic cs_tau_start = 0, cs_eye_start = 0;
  addr_t cs_eye_first = '0, cs_eye_last = '0;
  logic fc_start, fc_done = 0;
  lambda_t fc_lambda_in, fc_lambda = '0, fc_tau_lambda = '0;
  addr_t fc_g1_first, fc_g1_last, fc_g2_first, fc_g2_last;
  logic fc_tau_start = 0, fc_eye_start = 0;
  addr_t fc_eye_first = '0, fc_eye_last = '0;
  logic tau_start, eye_start, eye_hires;
  lambda_t tau_lambda, lambda_out;
  addr_t eye_first, eye_last;

  logic use_locked = 0;
  main_fsm dut (.*);

  // single fine stage instance, same inputs, own outputs
  logic s_busy, s_done, s_fail, s_sh, s_cap, s_eclr, s_een, s_cs, s_fc, s_ts, s_es, s_hi;
  lambda_t s_csl, s_fcl, s_tl, s_lout;
  addr_t s_g1f, s_g1l, s_g2f, s_g2l, s_ef, s_el;
  main_fsm #(.N_SAMPLES(2048), .FINE_STAGES(1)) dut1 (
    .clk(clk), .rst_n(rst_n), .start(start), .use_locked(use_locked),
    .busy(s_busy), .done(s_done), .fail(s_fail), .lambda_out(s_lout),
    .sh_enable(s_sh), .cap_start(s_cap), .cap_done(cap_done),
    .est_clr(s_eclr), .est_enable(s_een), .est_done(est_done), .est_value(est_value),
    .cs_start(s_cs), .cs_lambda_init(s_csl), .cs_done(cs_done), .cs_fail(cs_fail),
    .cs_lambda(cs_lambda), .cs_tau_start(cs_tau_start), .cs_tau_lambda(cs_tau_lambda),
    .cs_eye_start(cs_eye_start), .cs_eye_first(cs_eye_first), .cs_eye_last(cs_eye_last),
    .fc_start(s_fc), .fc_lambda_in(s_fcl), .fc_g1_first(s_g1f), .fc_g1_last(s_g1l),
    .fc_g2_first(s_g2f), .fc_g2_last(s_g2l), .fc_done(fc_done), .fc_lambda(fc_lambda),
    .fc_tau_start(fc_tau_start), .fc_tau_lambda(fc_tau_lambda),
    .fc_eye_start(fc_eye_start), .fc_eye_first(fc_eye_first), .fc_eye_last(fc_eye_last),
    .tau_start(s_ts), .tau_lambda(s_tl), .eye_start(s_es), .eye_first(s_ef),
    .eye_last(s_el), .eye_hires(s_hi));

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // count start pulses
  int n_cap, n_cs, n_fc, n_fc1, n_est;
  always @(posedge clk) begin
    if (s_fc)       n_fc1++;
    if (est_clr)    n_est++;
    if (cap_start) n_cap++;
    if (cs_start)  n_cs++;
    if (fc_start)  n_fc++;
  end

  task automatic wait_pulse(ref logic sig, input string what);
    int t = 0;
    while (!sig && t < 1000) begin @(posedge clk); #1; t++; end
    check(sig == 1'b1, {what, " pulse seen"});
    @(posedge clk); #1;
    check(sig == 1'b0, {what, " is a single-cycle pulse"});
  endtask

  task automatic idle_cycles(int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  // one request from the module to the shared blocks, checked at the mux
  task automatic check_mux_coarse();
    lambda_t l = lambda_t'($urandom);
    addr_t f = addr_t'($urandom), e = addr_t'($urandom);
    cs_tau_lambda = l; cs_eye_first = f; cs_eye_last = e;
    cs_tau_start = 1; cs_eye_start = 1; fc_tau_start = 1; fc_eye_start = 1;
    #1;
    check(tau_start && tau_lambda == l && eye_start && eye_first == f && eye_last == e,
          "coarse phase routes the coarse search to the shared blocks");
    cs_tau_start = 0; cs_eye_start = 0;
    #1;
    check(!tau_start && !eye_start, "fine correction masked during the coarse phase");
    fc_tau_start = 0; fc_eye_start = 0;
    check(!eye_hires, "32 bins during the coarse phase");
  endtask

  task automatic check_mux_fine(bit hi);
    lambda_t l = lambda_t'($urandom);
    addr_t f = addr_t'($urandom), e = addr_t'($urandom);
    fc_tau_lambda = l; fc_eye_first = f; fc_eye_last = e;
    fc_tau_start = 1; fc_eye_start = 1;
    #1;
    check(tau_start && tau_lambda == l && eye_start && eye_first == f && eye_last == e,
          "fine phase routes the fine correction to the shared blocks");
    fc_tau_start = 0; fc_eye_start = 0;
    cs_tau_start = 1; cs_eye_start = 1;
    #1;
    check(!tau_start && !eye_start, "coarse search masked during a fine phase");
    cs_tau_start = 0; cs_eye_start = 0;
    check(eye_hires == hi, hi ? "64 bins in the high resolution phase"
                              : "32 bins in the low resolution phase");
    if (!hi)
      check(fc_g1_first == 0 && fc_g1_last == 1023 && fc_g2_first == 1024 && fc_g2_last == 2047,
            "low resolution groups 0..1023 / 1024..2047");
    else
      check(fc_g1_first == 0 && fc_g1_last == 2047 && fc_g2_first == 1024 && fc_g2_last == 3071,
            "high resolution groups 0..2047 / 1024..3071");
  endtask

  task automatic respond(ref logic sig);
    idle_cycles($urandom_range(2, 20));
    sig = 1; @(posedge clk); #1; sig = 0;
  endtask

  task automatic run(bit coarse_fails, bit locked = 0);
    lambda_t l_cs = lambda_t'($urandom), l_f1 = lambda_t'($urandom), l_f2 = lambda_t'($urandom);
    logic [EST_W-1:0] est = EST_W'($urandom);
    int c0 = n_cap, s0 = n_cs, f0 = n_fc, g0 = n_fc1, e0 = n_est;
    lambda_t prev = lambda_out, prev1 = s_lout;
    check(!busy, "idle before start");
    use_locked = locked;
    start = 1; @(posedge clk); #1; start = 0; use_locked = 0;
    check(busy && sh_enable && !done && !fail, "capture phase: busy, sample and hold enabled");
    idle_cycles(5);
    check(sh_enable && !est_enable, "sample and hold stays enabled until the capture ends");
    respond(cap_done);
    if (locked) begin
      check(!sh_enable && !est_clr && !est_enable, "locked run: no estimation");
      check(fc_start && fc_lambda_in == prev, "locked run: fine correction starts from the previous lambda");
      check(s_fc && s_fcl == prev1, "locked run, single stage: starts from its previous lambda");
      check_mux_fine(0);
      fc_lambda = l_f1;
      respond(fc_done);
      idle_cycles(2);
      check(s_done && !s_busy && s_lout == l_f1, "single stage instance done after one fine stage");
      check(fc_start == 0 && fc_lambda_in == l_f1, "locked run: high resolution stage follows");
      check_mux_fine(1);
      fc_lambda = l_f2;
      respond(fc_done);
      idle_cycles(2);
      check(done && !fail && !busy && lambda_out == l_f2, "locked run ends with the fine result");
      check(n_cs == s0 && n_est == e0, "locked run: no coarse search, no estimator clear");
      check(n_fc == f0 + 2 && n_fc1 == g0 + 1, "locked run: two fine starts, one in the single stage instance");
      return;
    end
    check(!sh_enable && est_clr, "capture end: sample and hold off, estimator cleared");
    idle_cycles(1);
    check(!est_clr && est_enable, "estimator enabled after one clear cycle");
    idle_cycles(8);
    check(est_enable && n_cs == s0, "estimator runs until its done");
    est_value = est;
    respond(est_done);
    check(!est_enable, "estimator disabled after done");
    check(cs_start, "coarse search start pulse");
    check(cs_lambda_init == {est, 8'b0}, "coarse search starts from the estimate << 8");
    check_mux_coarse();
    cs_lambda = l_cs; cs_fail = coarse_fails;
    respond(cs_done);
    cs_fail = 0;
    if (coarse_fails) begin
      idle_cycles(2);
      check(done && fail && !busy, "coarse failure ends the run with fail");
      check(lambda_out == l_cs, "lambda_out after failure is the coarse search output");
      check(n_fc == f0, "no fine correction after a coarse failure");
    end else begin
      check(fc_start && fc_lambda_in == l_cs, "low resolution fine start with the coarse lambda");
      check_mux_fine(0);
      check(s_fc && s_fcl == l_cs && s_g2l == 2047 && !s_hi, "single stage instance starts its only stage");
      fc_lambda = l_f1;
      respond(fc_done);
      check(fc_start && fc_lambda_in == l_f1, "high resolution fine start with the first fine lambda");
      idle_cycles(1);
      check(s_done && !s_busy && s_lout == l_f1 && n_fc1 == g0 + 1,
            "single stage instance done after the low resolution stage");
      check(!done, "not done between the fine phases");
      check_mux_fine(1);
      fc_lambda = l_f2;
      respond(fc_done);
      idle_cycles(2);
      check(done && !fail && !busy, "run ends with done, no fail");
      check(lambda_out == l_f2, "lambda_out is the second fine correction result");
      check(n_fc == f0 + 2, "exactly two fine starts");
      check(eye_hires == 1'b0, "32 bins again after the run");
    end
    check(n_cap == c0 + 1 && n_cs == s0 + 1, "one capture start and one coarse start per run");
    idle_cycles(3);
    check(done && !busy, "done held until the next start");
  endtask

  initial begin
    @(negedge clk); rst_n = 0; idle_cycles(3); rst_n = 1; idle_cycles(2);
    check(!busy && !done && !sh_enable && !est_enable, "reset state");
    for (int i = 0; i < 5; i++) run(0);
    run(1);
    run(0);
    run(0, 1);
    run(0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
