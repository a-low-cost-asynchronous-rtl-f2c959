// main_fsm: sequences one complete reconstruction and shares the tau
// calculator and the eye finder between the correction modules.
//
// Sequence after a start pulse:
//   CAPTURE   enable the sample and hold (sh_enable) and have the memory
//             controller store N_SAMPLES ADC codes;
//   ESTIMATE  clear the lambda estimator, enable it and wait for its done;
//             its 10-bit estimate becomes the top bits of the 18-bit lambda;
//   COARSE    coarse search from that estimate (32 bins, samples 0..1023);
//   FINE_LO   fine correction, groups 0..1023 and 1024..2047, 32 bins;
//   FINE_HI   fine correction, groups 0..2047 and 1024..3071, 64 bins;
//   FINISH    done rises and lambda_out holds the final lambda; the tau
//             store holds the final reconstruction.
// With use_locked high at start the run reuses the lambda_out of the
// previous run: it skips ESTIMATE and COARSE and goes from CAPTURE
// straight to the fine correction, which keeps following slow drift
// (about 0.3 ms per run at 75 MHz instead of about 2 ms). With
// FINE_STAGES = 1 only the low resolution stage runs, and 2048 samples
// (N_SAMPLES = 2048) are enough.
// A coarse search failure ends the run at once with fail set. While a
// phase runs, its module's tau_start / tau_lambda and eye_start /
// eye_first / eye_last are routed to the shared blocks, and hires selects
// 64 bins in FINE_HI only. busy is high from start to the end. The phase
// order, the group table, the locked-lambda reuse and the single-stage
// option follow the reference design; the handshakes, the failure
// handling, use_locked and the FINE_STAGES parameter are this
// implementation's.
module main_fsm
  import eyerec_pkg::*;
#(
  parameter int unsigned N_SAMPLES   = SNAPSHOT_LEN,
  parameter int unsigned FINE_STAGES = 2      // 1: low resolution stage only
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        use_locked,   // sampled with start: reuse lambda_out
  output logic        busy,
  output logic        done,
  output logic        fail,
  output lambda_t     lambda_out,
  // sample and hold / capture
  output logic        sh_enable,
  output logic        cap_start,
  input  logic        cap_done,
  // lambda estimator
  output logic        est_clr,
  output logic        est_enable,
  input  logic        est_done,
  input  logic [EST_W-1:0] est_value,
  // coarse search
  output logic        cs_start,
  output lambda_t     cs_lambda_init,
  input  logic        cs_done,
  input  logic        cs_fail,
  input  lambda_t     cs_lambda,
  input  logic        cs_tau_start,
  input  lambda_t     cs_tau_lambda,
  input  logic        cs_eye_start,
  input  addr_t       cs_eye_first,
  input  addr_t       cs_eye_last,
  // fine correct (one instance, used twice)
  output logic        fc_start,
  output lambda_t     fc_lambda_in,
  output addr_t       fc_g1_first,
  output addr_t       fc_g1_last,
  output addr_t       fc_g2_first,
  output addr_t       fc_g2_last,
  input  logic        fc_done,
  input  lambda_t     fc_lambda,
  input  logic        fc_tau_start,
  input  lambda_t     fc_tau_lambda,
  input  logic        fc_eye_start,
  input  addr_t       fc_eye_first,
  input  addr_t       fc_eye_last,
  // shared tau calculator and eye finder
  output logic        tau_start,
  output lambda_t     tau_lambda,
  output logic        eye_start,
  output addr_t       eye_first,
  output addr_t       eye_last,
  output logic        eye_hires
);

  typedef enum logic [2:0] {
    IDLE, CAPTURE, EST_CLEAR, ESTIMATE, COARSE, FINE_LO, FINE_HI, FINISH
  } phase_t;
  phase_t phase;
  logic   locked_q;     // this run reuses the previous lambda

  localparam addr_t GRP = addr_t'(1024);   // fine correct group offset

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase          <= IDLE;
      locked_q       <= 1'b0;
      busy           <= 1'b0;
      done           <= 1'b0;
      fail           <= 1'b0;
      lambda_out     <= '0;
      sh_enable      <= 1'b0;
      cap_start      <= 1'b0;
      est_clr        <= 1'b1;
      est_enable     <= 1'b0;
      cs_start       <= 1'b0;
      cs_lambda_init <= '0;
      fc_start       <= 1'b0;
      fc_lambda_in   <= '0;
    end else begin
      cap_start <= 1'b0;
      cs_start  <= 1'b0;
      fc_start  <= 1'b0;
      est_clr   <= 1'b0;
      unique case (phase)
        IDLE: if (start) begin
          locked_q  <= use_locked;
          busy      <= 1'b1;
          done      <= 1'b0;
          fail      <= 1'b0;
          sh_enable <= 1'b1;
          cap_start <= 1'b1;
          phase     <= CAPTURE;
        end
        CAPTURE: if (cap_done) begin
          sh_enable <= 1'b0;
          if (locked_q) begin
            fc_lambda_in <= lambda_out;
            fc_start     <= 1'b1;
            phase        <= FINE_LO;
          end else begin
            est_clr <= 1'b1;
            phase   <= EST_CLEAR;
          end
        end
        EST_CLEAR: begin
          est_enable <= 1'b1;
          phase      <= ESTIMATE;
        end
        ESTIMATE: if (est_done) begin
          est_enable     <= 1'b0;
          cs_lambda_init <= {est_value, {(LAMBDA_W - EST_W){1'b0}}};
          cs_start       <= 1'b1;
          phase          <= COARSE;
        end
        COARSE: if (cs_done) begin
          if (cs_fail) begin
            fail       <= 1'b1;
            lambda_out <= cs_lambda;
            phase      <= FINISH;
          end else begin
            fc_lambda_in <= cs_lambda;
            fc_start     <= 1'b1;
            phase        <= FINE_LO;
          end
        end
        FINE_LO: if (fc_done) begin
          if (FINE_STAGES > 1) begin
            fc_lambda_in <= fc_lambda;
            fc_start     <= 1'b1;
            phase        <= FINE_HI;
          end else begin
            lambda_out <= fc_lambda;
            phase      <= FINISH;
          end
        end
        FINE_HI: if (fc_done) begin
          lambda_out <= fc_lambda;
          phase      <= FINISH;
        end
        FINISH: begin
          busy  <= 1'b0;
          done  <= 1'b1;
          phase <= IDLE;
        end
        default: phase <= IDLE;
      endcase
    end
  end

  // group addresses of the two fine correction phases
  always_comb begin
    if (phase == FINE_HI) begin
      fc_g1_first = addr_t'(0);
      fc_g1_last  = addr_t'(2 * GRP - 1);
      fc_g2_first = GRP;
      fc_g2_last  = addr_t'(N_SAMPLES - 1);
    end else begin
      fc_g1_first = addr_t'(0);
      fc_g1_last  = GRP - 1'b1;
      fc_g2_first = GRP;
      fc_g2_last  = addr_t'(2 * GRP - 1);
    end
  end

  // shared blocks follow the phase's module
  always_comb begin
    if (phase == COARSE) begin
      tau_start  = cs_tau_start;
      tau_lambda = cs_tau_lambda;
      eye_start  = cs_eye_start;
      eye_first  = cs_eye_first;
      eye_last   = cs_eye_last;
    end else begin
      tau_start  = fc_tau_start && (phase == FINE_LO || phase == FINE_HI);
      tau_lambda = fc_tau_lambda;
      eye_start  = fc_eye_start && (phase == FINE_LO || phase == FINE_HI);
      eye_first  = fc_eye_first;
      eye_last   = fc_eye_last;
    end
    eye_hires = (phase == FINE_HI);
  end

endmodule
