// Self-checking testbench for eye_finder.
// The testbench plays the memory controller: on rd_start it streams the
// requested (tau, y) pairs from its own arrays, one per cycle, starting
// two cycles later, with rd_end on the last. A reference model computes
// per-bin openings and, for each window, the plain 8-term average (not
// push and pop), and from them range, deviation and location. Data sets:
// a clean synthetic eye, the same eye with drift, pure noise and sparse
// groups with empty bins, at 32 and 64 bins. Timing: done must come
// 1 + 8 + M cycles after the last pair (8 + M filter cycles).
`timescale 1ns/1ps
module tb_eye_finder;
  import eyerec_pkg::*;
  logic clk = 0, rst_n = 1, start = 0, hires = 0;
  addr_t first = 0, last = 0;
  logic rd_start; addr_t rd_first, rd_last;
  logic rd_valid = 0, rd_end = 0; tau_t rd_tau = 0; y_t rd_y = 0;
  logic done; eye_result_t result;
  int checks = 0, failures = 0;
  tau_t tau_m [3072];
  y_t   y_m   [3072];

  eye_finder dut (.*);
  always #5 clk = ~clk;

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory controller stand-in
  int unsigned last_pair_cycle, cyc = 0;
  always @(posedge clk) cyc++;
  always @(posedge clk) if (rd_start) begin
    automatic int unsigned f = rd_first, l = rd_last;
    @(posedge clk);
    for (int unsigned a = f; a <= l; a++) begin
      @(posedge clk);
      #1 rd_valid = 1; rd_tau = tau_m[a]; rd_y = y_m[a]; rd_end = (a == l);
      last_pair_cycle = cyc + 1;   // consumed at the next edge
    end
    @(posedge clk) #1 rd_valid = 0; rd_end = 0;
  end

  // synthetic eye: transition ramp over phase [0, 0.25), levels 56 / 200
  function automatic y_t wave(real p, bit prev, bit cur, int noise);
    real a = prev ? 200.0 : 56.0, b = cur ? 200.0 : 56.0, v;
    v = (p < 0.25) ? a + (b - a) * p / 0.25 : b;
    v += real'(noise);
    if (v < 0.0) v = 0.0;
    if (v > 255.0) v = 255.0;
    return y_t'(int'(v));
  endfunction

  task automatic make_eye(real lam_true, real lam_used, real ph0);
    bit prev = 0, cur;
    for (int n = 0; n < 3072; n++) begin
      real p = n * lam_true + ph0;
      p = p - $floor(p);
      cur = $urandom_range(0, 1) == 1;
      prev = $urandom_range(0, 1) == 1;
      y_m[n] = wave(p, prev, cur, int'($urandom_range(0, 8)) - 4);
      p = n * lam_used;
      tau_m[n] = tau_t'(int'($floor((p - $floor(p)) * 256.0)));
    end
  endtask

  task automatic run(int unsigned f, int unsigned l, bit hr);
    int unsigned M = hr ? 64 : 32, sh = hr ? 2 : 3;
    int unsigned hasl [64], hash [64];
    int mxl [64], mnh [64], op [64];
    int fmax = 0, fmin = 255, umax = 0, imax = 0, filt, sum;
    eye_result_t exp_r;
    for (int b = 0; b < 64; b++) begin hasl[b] = 0; hash[b] = 0; mxl[b] = 0; mnh[b] = 255; end
    for (int unsigned a = f; a <= l; a++) begin
      int b = int'(tau_m[a]) >> sh;
      if (y_m[a] < 128) begin hasl[b] = 1; if (y_m[a] > mxl[b]) mxl[b] = y_m[a]; end
      else begin hash[b] = 1; if (y_m[a] < mnh[b]) mnh[b] = y_m[a]; end
    end
    for (int b = 0; b < M; b++) begin
      op[b] = (hasl[b] != 0 && hash[b] != 0) ? mnh[b] - mxl[b] : 0;
      if (op[b] > umax) umax = op[b];
    end
    for (int i = 0; i < M; i++) begin
      sum = 0;
      for (int j = 0; j < 8; j++) sum += op[(i + j) % M];
      filt = sum / 8;
      if (filt > fmax) begin fmax = filt; imax = i; end
      if (filt < fmin) fmin = filt;
    end
    exp_r.range = 8'(fmax - fmin);
    exp_r.deviation = 8'(umax - fmax);
    exp_r.location = tau_t'(((imax + 4) % M) << sh);
    @(negedge clk) start = 1; first = addr_t'(f); last = addr_t'(l); hires = hr;
    @(negedge clk) start = 0;
    wait (done);
    checks++;
    if (result !== exp_r) begin
      failures++;
      $display("FAIL %0d..%0d hires=%0b got r=%0d d=%0d l=%0d exp r=%0d d=%0d l=%0d", f, l, hr,
               result.range, result.deviation, result.location,
               exp_r.range, exp_r.deviation, exp_r.location);
    end
    checks++;
    if (cyc - last_pair_cycle != 1 + 8 + M) begin
      failures++; $display("FAIL done %0d cycles after last pair, expected %0d", cyc - last_pair_cycle, 9 + M);
    end
    @(negedge clk);
  endtask

  initial begin
    #1 rst_n = 0;
    #20 rst_n = 1;
    // clean eye, exact lambda: centre of the open part near phase 0.625 - 0.3
    make_eye(0.5860, 0.5860, 0.3);
    run(0, 1023, 0);
    checks++;
    if (result.range < 32 || result.deviation > 16) begin
      failures++; $display("FAIL clean eye not open: r=%0d d=%0d", result.range, result.deviation);
    end
    run(0, 2047, 1);
    run(1024, 3071, 1);
    // drifting eye (lambda off by 1/2048): closes over 1024 samples
    make_eye(0.5860, 0.5860 + 1.0 / 1024.0, 0.1);
    run(0, 1023, 0);
    checks++;
    if (result.range >= 32 && result.deviation <= 16) begin
      failures++; $display("FAIL drifting eye reported open");
    end
    run(1024, 2047, 0);
    // noise
    for (int n = 0; n < 3072; n++) begin y_m[n] = y_t'($urandom); tau_m[n] = tau_t'($urandom); end
    run(0, 1023, 0);
    run(0, 3071, 1);
    // sparse groups leave empty bins
    run(100, 130, 0);
    run(5, 40, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
