// End-to-end testbench for the smaller variant of eye_recon_top:
// 2048 samples and a single (low resolution) fine correction stage
// (N_SAMPLES = 2048, FINE_STAGES = 1), with the same clocks as the full
// system: 75 MHz system clock, 201.67 MHz sampling clock, PRBS15 data at
// 10 Gb/s or 1 Gb/s, large and small eyes. The behavioural front end is
// adc_eye_model, as in tb_eye_recon_top.
// Checks per run: the estimate within the counting window bound; no fail;
// the final lambda within 48 / 2^18 of the true value (one stage leaves a
// somewhat larger error than two); all 2048 tau values, read through the
// host port, equal floor(frac(n * lambda_out) * 256); the rebuilt eye open
// by at least half of its ideal height; the high resolution stage never
// selected. Mechanisms counted (a missing one is a failure): capture,
// estimation, coarse success, coarse retry, single fine stage.
`timescale 1ps/1fs
module tb_eye_recon_2048;
  import eyerec_pkg::*;

  localparam real T_SAMP = 4958.6;       // 201.67 MHz
  localparam real T_SYS  = 13333.333;    // 75 MHz

  logic sys_clk = 0, samp_clk = 0, rst_n = 1, start = 0, data_in = 0;
  y_t adc_data;
  logic sh_enable, busy, done, fail;
  logic [9:0] lambda_est;
  lambda_t lambda_out;
  logic [15:0] coarse_trials;
  logic [1:0] fine_wrapped;
  addr_t host_addr = '0;
  tau_t host_tau;
  y_t host_y;
  int checks = 0, failures = 0;

  logic use_locked = 0;
  eye_recon_top #(.N_SAMPLES(2048), .FINE_STAGES(1)) dut (.*);

  // behavioural front end
  real lam_true = 0.0, ph0 = 0.0, t_bit = 100.0;
  int noise = 3;
  logic noise_only = 0, data_on = 0;
  adc_eye_model u_adc (.samp_clk(samp_clk), .index(dut.u_mem.waddr), .lam_true(lam_true),
    .ph0(ph0), .noise(noise), .noise_only(noise_only), .adc_data(adc_data));

  always #(T_SYS / 2.0) sys_clk = ~sys_clk;
  always #(T_SAMP / 2.0) samp_clk = ~samp_clk;

  // PRBS15 link data
  logic [14:0] lfsr = 15'h1;
  initial forever begin
    wait (data_on);
    while (data_on) begin
      #(t_bit);
      lfsr    = {lfsr[13:0], lfsr[14] ^ lfsr[13]};
      data_in = lfsr[0];
    end
  end

  initial begin
    #400_000_000_000;      // 400 ms
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

  // mechanism counters
  int n_capture = 0, n_estimate = 0, n_retry = 0, n_coarse_ok = 0, n_coarse_fail = 0;
  int n_fine = 0, n_wrap = 0, n_hires = 0, n_fine1 = 0;
  logic cap_done_q = 0, est_done_q = 0, hires_q = 0;
  always @(posedge sys_clk) begin
    if (dut.cap_done && !cap_done_q) n_capture++;
    if (dut.est_done && !est_done_q) n_estimate++;
    if (dut.fc_done) n_fine1++;
    if (dut.eye_hires && !hires_q) n_hires++;
    cap_done_q <= dut.cap_done;
    est_done_q <= dut.est_done;
    hires_q    <= dut.eye_hires;
    if (dut.est_done && !est_done_q) data_on <= 1'b0;
  end

  function automatic real frac(real x);
    return x - $floor(x);
  endfunction

  task automatic host_read(addr_t a, output tau_t t, output y_t y);
    @(negedge sys_clk) host_addr = a;
    @(posedge sys_clk); #1;
    t = host_tau; y = host_y;
  endtask

  int n_locked = 0;

  task automatic run(string name, real tb_ps, real phase, int nz, bit no_eye, bit locked = 0);
    real ratio, est_true, e_lam;
    int est_short, cyc = 0, est0 = n_estimate;
    logic [15:0] trials0 = coarse_trials;
    t_bit = tb_ps; ph0 = phase; noise = nz; noise_only = no_eye;
    ratio = T_SAMP / t_bit;
    lam_true = frac(ratio);
    data_on = 1;
    @(negedge sys_clk) begin start = 1; use_locked = locked; end
    @(negedge sys_clk) begin start = 0; use_locked = 0; end
    check(busy, {name, ": busy after start"});
    while (!done && cyc < 3_000_000) begin @(posedge sys_clk); cyc++; end
    #1;
    check(done && !busy, {name, ": run ends"});
    if (locked) begin
      check(n_estimate == est0 && coarse_trials == trials0,
            {name, ": locked run skips estimation and coarse search"});
      check(cyc < 22500, $sformatf("%s: locked run took %0d cycles", name, cyc));
      if (n_estimate == est0 && cyc < 22500) n_locked++;
      data_on = 0;
    end
    est_true  = lam_true * 1024.0;
    est_short = (int'($floor(est_true)) - int'(lambda_est)) & 1023;
    if (est_short > 512) est_short -= 1024;
    check(est_short >= -2 && real'(est_short) <= ratio + 2.0,
          $sformatf("%s: estimate %0d for %.2f", name, lambda_est, est_true));
    if (coarse_trials > 1 && !locked) n_retry++;
    if (no_eye) begin
      check(fail, {name, ": noise only fails"});
      check(coarse_trials == 512, {name, ": failure after 512 trials"});
      if (fail) n_coarse_fail++;
      $display("%s: est=%0d trials=%0d fail=%0b", name, lambda_est, coarse_trials, fail);
    end else begin
      int bad_tau = 0;
      int lo[32], hi[32];
      int best = -1;
      check(!fail, {name, ": eye found"});
      if (!fail && !locked) begin
        n_coarse_ok++;
        n_fine += 2;
      end
      if (fine_wrapped != 0) n_wrap++;
      e_lam = real'(lambda_out) / 262144.0 - lam_true;
      if (e_lam > 0.5) e_lam -= 1.0;
      if (e_lam < -0.5) e_lam += 1.0;
      check(e_lam * 262144.0 < 48.0 && e_lam * 262144.0 > -48.0,
            $sformatf("%s: lambda error %.1f / 2^18", name, e_lam * 262144.0));
      for (int b = 0; b < 32; b++) begin lo[b] = 0; hi[b] = 255; end
      for (int n = 0; n < N_SAMPLES_TB; n++) begin
        tau_t t; y_t y;
        logic [LAMBDA_W-1:0] acc;
        host_read(addr_t'(n), t, y);
        acc = LAMBDA_W'(n * lambda_out);
        if (t != acc[LAMBDA_W-1 -: TAU_W]) bad_tau++;
        if (y < 128) begin if (int'(y) > lo[t[7:3]]) lo[t[7:3]] = y; end
        else if (int'(y) < hi[t[7:3]]) hi[t[7:3]] = y;
      end
      check(bad_tau == 0, $sformatf("%s: %0d tau entries disagree with lambda_out", name, bad_tau));
      for (int b = 0; b < 32; b++) if (hi[b] - lo[b] > best) best = hi[b] - lo[b];
      check(best >= (144 - 2 * nz) / 2,
            $sformatf("%s: rebuilt eye opening %0d", name, best));
      $display("%s: lam_true=%.6f est=%0d trials=%0d lambda_out=%.6f err=%.1f/2^18 wrap=%b opening=%0d cycles=%0d",
               name, lam_true, lambda_est, coarse_trials, real'(lambda_out) / 262144.0,
               e_lam * 262144.0, fine_wrapped, best, cyc);
    end
  endtask

  localparam int N_SAMPLES_TB = 2048;

  initial begin
    #1000 rst_n = 0;
    #50000 rst_n = 1;
    #50000;
    run("10G large eye",  100.0, 0.20,  3, 0);
    run("10G small eye",  100.0, 0.45, 30, 0);
    run("1G large eye",  1000.0, 0.70,  3, 0);
    run("1G small eye",  1000.0, 0.35, 30, 0);
    check(n_capture == 4, $sformatf("captures %0d", n_capture));
    check(n_estimate == 4, $sformatf("estimates %0d", n_estimate));
    check(n_retry > 0, "coarse retry happened");
    check(n_coarse_ok == 4, "coarse success in every run");
    check(n_fine1 == 4, "one fine stage per run");
    check(n_hires == 0, "high resolution stage never selected");
    $display("mechanisms: capture=%0d estimate=%0d coarse_retry=%0d coarse_ok=%0d fine=%0d fine_wrap=%0d hires=%0d",
             n_capture, n_estimate, n_retry, n_coarse_ok, n_fine1, n_wrap, n_hires);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
