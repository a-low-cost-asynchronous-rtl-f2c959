// Self-checking testbench for tau_calc: for several lambdas every written
// tau must equal the top 8 bits of (n * lambda) mod 2^18 at address n;
// all 3072 addresses are written once, in order, and done comes
// N_SAMPLES + 1 cycles after start.
`timescale 1ns/1ps
module tb_tau_calc;
  import eyerec_pkg::*;
  logic clk = 0, rst_n = 1, start = 0;
  lambda_t lambda;
  logic tau_we, done;
  addr_t tau_addr;
  tau_t tau_wdata;
  int checks = 0, failures = 0;

  tau_calc dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(lambda_t lam);
    int unsigned writes = 0, cycles = 0;
    longint unsigned prod;
    @(negedge clk); start = 1; lambda = lam;
    @(negedge clk); start = 0; lambda = '0;
    cycles = 1;
    while (!done) begin
      if (tau_we) begin
        prod = (longint'(tau_addr) * longint'(lam)) % (64'd1 << 18);
        checks++;
        if (tau_addr != addr_t'(writes) || tau_wdata != tau_t'(prod >> 10)) begin
          failures++;
          $display("FAIL lam=%0h n=%0d addr=%0d tau=%0d", lam, writes, tau_addr, tau_wdata);
        end
        writes++;
      end
      @(negedge clk); cycles++;
    end
    if (tau_we) writes++;
    checks++;
    if (writes != 3072 || cycles != 3072 + 1) begin
      failures++; $display("FAIL writes=%0d cycles=%0d", writes, cycles);
    end
  endtask

  initial begin
    #1 rst_n = 0;
    #11 rst_n = 1;
    run(18'h25800);
    run(18'h0_0001);
    run(18'h3FFFF);
    run(lambda_t'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
