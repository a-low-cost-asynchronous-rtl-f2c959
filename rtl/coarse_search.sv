// coarse_search: trial and error search for a lambda that opens the eye.
//
// After start the module reconstructs all taus with the trial lambda
// (RECONSTRUCT), asks the eye finder for the opening of samples
// GROUP_FIRST..GROUP_LAST (FIND_EYE) and accepts the trial when
// range >= MIN_RANGE and deviation <= MAX_DEVIATION. Otherwise it tries
// the next value, alternating right and left of the initial estimate:
// trial 0 = lambda_init, then +1, -1, +2, -2 ... steps of STEP. Two
// registers hold the current right and left trial values. After
// MAX_TRIAL trials without an open eye it passes through FAIL and raises
// fail. done pulses at the end of either outcome; lambda_out, fail and
// trials (number of trials made) then hold until the next start.
// With the defaults the search covers +-256 steps of 2^-11 = +-0.125 of a
// period. States, criterion, step, trial limit and the alternating order
// follow the reference design.
// Only range and deviation of the eye result matter here; its location
// is for the fine correction (lint reports it unused in this module).
module coarse_search
  import eyerec_pkg::*;
#(
  parameter logic [7:0]  MIN_RANGE     = 8'd32,
  parameter logic [7:0]  MAX_DEVIATION = 8'd16,
  parameter lambda_t     STEP          = lambda_t'(1) << (LAMBDA_W - 11),
  parameter int unsigned MAX_TRIAL     = 512,
  parameter addr_t       GROUP_FIRST   = addr_t'(0),
  parameter addr_t       GROUP_LAST    = addr_t'(1023)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  lambda_t     lambda_init,
  // tau calculator
  output logic        tau_start,
  output lambda_t     tau_lambda,
  input  logic        tau_done,
  // eye finder
  output logic        eye_start,
  output addr_t       eye_first,
  output addr_t       eye_last,
  input  logic        eye_done,
  input  eye_result_t eye_res,
  // status
  output logic        done,
  output logic        fail,
  output lambda_t     lambda_out,
  output logic [15:0] trials
);

  typedef enum logic [1:0] {IDLE, RECONSTRUCT, FIND_EYE, FAIL} state_t;
  state_t state;

  lambda_t right_q, left_q;     // latest trial values on each side

  assign eye_first = GROUP_FIRST;
  assign eye_last  = GROUP_LAST;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= IDLE;
      right_q    <= '0;
      left_q     <= '0;
      tau_start  <= 1'b0;
      tau_lambda <= '0;
      eye_start  <= 1'b0;
      done       <= 1'b0;
      fail       <= 1'b0;
      lambda_out <= '0;
      trials     <= '0;
    end else begin
      tau_start <= 1'b0;
      eye_start <= 1'b0;
      done      <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          right_q    <= lambda_init;
          left_q     <= lambda_init;
          tau_lambda <= lambda_init;
          tau_start  <= 1'b1;
          fail       <= 1'b0;
          trials     <= 16'd1;
          state      <= RECONSTRUCT;
        end
        RECONSTRUCT: if (tau_done) begin
          eye_start <= 1'b1;
          state     <= FIND_EYE;
        end
        FIND_EYE: if (eye_done) begin
          if (eye_is_open(eye_res.range, eye_res.deviation, MIN_RANGE, MAX_DEVIATION)) begin
            lambda_out <= tau_lambda;
            done       <= 1'b1;
            state      <= IDLE;
          end else if (32'(trials) >= MAX_TRIAL) begin
            state <= FAIL;
          end else begin
            // odd trial numbers go right, even ones go left
            if (trials[0]) begin
              right_q    <= right_q + STEP;
              tau_lambda <= right_q + STEP;
            end else begin
              left_q     <= left_q - STEP;
              tau_lambda <= left_q - STEP;
            end
            trials    <= trials + 1'b1;
            tau_start <= 1'b1;
            state     <= RECONSTRUCT;
          end
        end
        FAIL: begin
          fail       <= 1'b1;
          lambda_out <= lambda_init;
          done       <= 1'b1;
          state      <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
