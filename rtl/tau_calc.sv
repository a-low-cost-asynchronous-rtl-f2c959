// tau_calc: the reconstruction itself, tau_n = mod(tau_{n-1} + lambda, 1).
//
// A start pulse latches lambda (an unsigned LAMBDA_W-bit fraction of one
// period) and clears the accumulator. For n = 0 .. N_SAMPLES-1 it then
// writes, one per cycle, the top TAU_W bits of the accumulator to tau
// address n and adds lambda; the accumulator's overflow is the mod 1.
// done pulses for one cycle with the last write. So tau_0 = 0 and a run
// takes N_SAMPLES + 1 cycles from start to done. Accumulator width (18)
// and the 8 stored bits are the reference design's; tau_0 = 0 and the one
// value per cycle rate are this implementation's.
module tau_calc
  import eyerec_pkg::*;
#(
  parameter int unsigned N_SAMPLES = SNAPSHOT_LEN
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  lambda_t lambda,
  output logic    tau_we,
  output addr_t   tau_addr,
  output tau_t    tau_wdata,
  output logic    done
);

  lambda_t lam_q, acc;
  addr_t   n;
  logic    busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      lam_q     <= '0;
      acc       <= '0;
      n         <= '0;
      tau_we    <= 1'b0;
      tau_addr  <= '0;
      tau_wdata <= '0;
      done      <= 1'b0;
    end else begin
      tau_we <= 1'b0;
      done   <= 1'b0;
      if (start) begin
        busy  <= 1'b1;
        lam_q <= lambda;
        acc   <= '0;
        n     <= '0;
      end else if (busy) begin
        tau_we    <= 1'b1;
        tau_addr  <= n;
        tau_wdata <= acc[LAMBDA_W-1 -: TAU_W];
        acc       <= acc + lam_q;
        n         <= n + 1'b1;
        if (32'(n) == N_SAMPLES - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
