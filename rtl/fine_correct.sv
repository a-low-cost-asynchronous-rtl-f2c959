// fine_correct: deterministic lambda correction from the drift of the eye.
//
// With a residual error e in lambda, the eye of a sample group appears
// shifted by -n*e after n samples. The module measures the eye location
// c1 of group 1 (g1_first..g1_last) and c2 of group 2 (g2_first..
// g2_last, which starts 1024 samples later), both in 1/256 of a period,
// and corrects lambda by the drift per sample:
//   d = c2 - c1 (signed),   lambda_new = lambda - d * 2^-8 / 1024
// which in the 18-bit lambda format is simply lambda - d. It then
// reconstructs with lambda_new (RECONSTRUCT) and checks with the coarse
// search's criterion that the eye over group 1 is open (FIND_EYE). If the
// eye closed, the drift had wrapped around the period and was read in
// the wrong direction: the module reconstructs with the other reading,
// d - 256 (d > 0) or d + 256 (d <= 0), in RECONSTRUCT_BAR and sets
// wrapped. done pulses at the end; lambda_out and wrapped then hold.
// The same module serves the low and the high resolution phase: the
// group addresses (and the bin count, at the eye finder) come from the
// caller. The state sequence and the correction follow the reference
// design; doing no further check after RECONSTRUCT_BAR is this
// implementation's choice.
module fine_correct
  import eyerec_pkg::*;
#(
  parameter logic [7:0] MIN_RANGE     = 8'd32,
  parameter logic [7:0] MAX_DEVIATION = 8'd16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  lambda_t     lambda_in,
  input  addr_t       g1_first,
  input  addr_t       g1_last,
  input  addr_t       g2_first,
  input  addr_t       g2_last,
  // eye finder
  output logic        eye_start,
  output addr_t       eye_first,
  output addr_t       eye_last,
  input  logic        eye_done,
  input  eye_result_t eye_res,
  // tau calculator
  output logic        tau_start,
  output lambda_t     tau_lambda,
  input  logic        tau_done,
  // status
  output logic        done,
  output logic        wrapped,
  output lambda_t     lambda_out
);

  typedef enum logic [2:0] {
    IDLE, FIND_EYE1, FIND_EYE2, RECONSTRUCT, FIND_EYE, RECONSTRUCT_BAR
  } state_t;
  state_t state;

  lambda_t lam_q, lam_bar;
  tau_t    c1;

  // signed drift and its wrapped-around reading
  logic signed [9:0] d, d_bar;
  assign d     = $signed({2'b00, eye_res.location}) - $signed({2'b00, c1});
  assign d_bar = (d > 0) ? d - 10'sd256 : d + 10'sd256;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= IDLE;
      lam_q      <= '0;
      lam_bar    <= '0;
      c1         <= '0;
      eye_start  <= 1'b0;
      eye_first  <= '0;
      eye_last   <= '0;
      tau_start  <= 1'b0;
      tau_lambda <= '0;
      done       <= 1'b0;
      wrapped    <= 1'b0;
      lambda_out <= '0;
    end else begin
      eye_start <= 1'b0;
      tau_start <= 1'b0;
      done      <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          lam_q     <= lambda_in;
          wrapped   <= 1'b0;
          eye_first <= g1_first;
          eye_last  <= g1_last;
          eye_start <= 1'b1;
          state     <= FIND_EYE1;
        end
        FIND_EYE1: if (eye_done) begin
          c1        <= eye_res.location;
          eye_first <= g2_first;
          eye_last  <= g2_last;
          eye_start <= 1'b1;
          state     <= FIND_EYE2;
        end
        FIND_EYE2: if (eye_done) begin
          // correct during the transition to RECONSTRUCT
          tau_lambda <= lam_q - lambda_t'(d);
          lam_bar    <= lam_q - lambda_t'(d_bar);
          tau_start  <= 1'b1;
          state      <= RECONSTRUCT;
        end
        RECONSTRUCT: if (tau_done) begin
          eye_first <= g1_first;
          eye_last  <= g1_last;
          eye_start <= 1'b1;
          state     <= FIND_EYE;
        end
        FIND_EYE: if (eye_done) begin
          if (eye_is_open(eye_res.range, eye_res.deviation, MIN_RANGE, MAX_DEVIATION)) begin
            lambda_out <= tau_lambda;
            done       <= 1'b1;
            state      <= IDLE;
          end else begin
            tau_lambda <= lam_bar;
            tau_start  <= 1'b1;
            wrapped    <= 1'b1;
            state      <= RECONSTRUCT_BAR;
          end
        end
        RECONSTRUCT_BAR: if (tau_done) begin
          lambda_out <= tau_lambda;
          done       <= 1'b1;
          state      <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
