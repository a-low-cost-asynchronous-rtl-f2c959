// eye_recon_top: digital part of an on-chip asynchronous eye diagram
// reconstruction system.
//
// The link data is undersampled by an external sample and hold plus 8-bit
// ADC on a free-running sampling clock that is not locked to the data.
// Each sample n sits at phase mod(n * lambda, 1) of the bit period, where
// lambda = mod(f_data, f_sample) / f_sample. This design finds lambda and
// assigns a phase (tau) to each of 3072 stored samples, so that plotting
// (tau, y) gives the eye diagram:
//   subrate_extractor  divides data and sampling clock by 128 each;
//   lambda_estimator   counts the two subrates: a 10-bit first estimate;
//   mem_ctrl           sample and tau stores, capture, burst and host read;
//   tau_calc           tau_n = mod(tau_{n-1} + lambda, 1);
//   eye_finder         opening and location of the eye of a sample group;
//   coarse_search      alternating search until the eye opens;
//   fine_correct       drift-based correction, run at low then high resolution;
//   main_fsm           sequencing and sharing of tau_calc / eye_finder.
// Interface: sys_clk (75 MHz in the reference design) clocks the control;
// samp_clk clocks adc_data into the sample store; data_in is the link
// data as a logic level (after the analog front end and limiter, which
// are not part of this RTL). A start pulse runs one reconstruction: busy
// goes high, sh_enable is high during the 3072-sample capture, and done
// rises at the end with lambda_out (18-bit fraction of a period) and, on
// a failed coarse search, fail. The result is read through host_addr ->
// host_tau / host_y, one cycle latency, while busy is low. The status
// outputs coarse_trials and fine_wrapped (bit 1 low, bit 0 high
// resolution phase) show what the correction did.
// use_locked, sampled with start, makes the run reuse the previous
// lambda_out: estimation and coarse search are skipped (coarse_trials then
// keeps its old value). FINE_STAGES = 1 together with N_SAMPLES = 2048
// gives the smaller single fine stage variant; fine_wrapped bit 0 then
// belongs to that stage. The estimator's raw counter outputs are left
// unconnected on purpose (they are for bring-up only), which lint reports
// as unused signals.
module eye_recon_top
  import eyerec_pkg::*;
#(
  parameter int unsigned N_SAMPLES       = SNAPSHOT_LEN,
  parameter int unsigned CNT_W           = 10,
  parameter int unsigned DATA_DIV_STAGES = 5,
  parameter int unsigned CLK_DIV_STAGES  = 7,
  parameter int unsigned FINE_STAGES     = 2
) (
  input  logic              sys_clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              use_locked,
  input  logic              data_in,
  input  logic              samp_clk,
  input  y_t                adc_data,
  output logic              sh_enable,
  output logic              busy,
  output logic              done,
  output logic              fail,
  output logic [CNT_W-1:0]  lambda_est,
  output lambda_t           lambda_out,
  output logic [15:0]       coarse_trials,
  output logic [1:0]        fine_wrapped,
  input  addr_t             host_addr,
  output tau_t              host_tau,
  output y_t                host_y
);

  // ---- lambda estimation path ----
  logic data_sub, samp_sub;
  logic est_clr, est_enable, est_done;
  logic [CNT_W-1:0] clock_count, data_count;
  logic data_overflow;

  subrate_extractor #(
    .DATA_DIV_STAGES(DATA_DIV_STAGES), .CLK_DIV_STAGES(CLK_DIV_STAGES)
  ) u_subrate (
    .data_in(data_in), .samp_clk(samp_clk), .rst_n(rst_n),
    .data_sub(data_sub), .samp_sub(samp_sub));

  lambda_estimator #(.CNT_W(CNT_W)) u_lambda_est (
    .samp_sub(samp_sub), .data_sub(data_sub), .sys_clk(sys_clk),
    .clr(est_clr || !rst_n), .enable(est_enable),
    .clock_count(clock_count), .data_count(data_count),
    .data_overflow(data_overflow), .done(est_done), .lambda_est(lambda_est));

  // ---- memories ----
  logic cap_start, cap_done;
  logic tau_we;  addr_t tau_addr;  tau_t tau_wdata;
  logic rd_start, rd_valid, rd_end;
  addr_t rd_first, rd_last;
  tau_t rd_tau;  y_t rd_y;

  mem_ctrl #(.N_SAMPLES(N_SAMPLES)) u_mem (
    .sys_clk(sys_clk), .samp_clk(samp_clk), .rst_n(rst_n),
    .cap_start(cap_start), .cap_done(cap_done), .adc_data(adc_data),
    .tau_we(tau_we), .tau_addr(tau_addr), .tau_wdata(tau_wdata),
    .rd_start(rd_start), .rd_first(rd_first), .rd_last(rd_last),
    .rd_valid(rd_valid), .rd_tau(rd_tau), .rd_y(rd_y), .rd_end(rd_end),
    .host_addr(host_addr), .host_tau(host_tau), .host_y(host_y));

  // ---- shared reconstruction blocks ----
  logic tau_start, tau_done;  lambda_t tau_lambda;
  logic eye_start, eye_done, eye_hires;
  addr_t eye_first, eye_last;
  eye_result_t eye_res;

  tau_calc #(.N_SAMPLES(N_SAMPLES)) u_tau (
    .clk(sys_clk), .rst_n(rst_n), .start(tau_start), .lambda(tau_lambda),
    .tau_we(tau_we), .tau_addr(tau_addr), .tau_wdata(tau_wdata),
    .done(tau_done));

  eye_finder u_eye (
    .clk(sys_clk), .rst_n(rst_n), .start(eye_start), .first(eye_first),
    .last(eye_last), .hires(eye_hires),
    .rd_start(rd_start), .rd_first(rd_first), .rd_last(rd_last),
    .rd_valid(rd_valid), .rd_tau(rd_tau), .rd_y(rd_y), .rd_end(rd_end),
    .done(eye_done), .result(eye_res));

  // ---- correction modules ----
  logic cs_start, cs_done, cs_fail, cs_tau_start, cs_eye_start;
  lambda_t cs_lambda_init, cs_lambda, cs_tau_lambda;
  addr_t cs_eye_first, cs_eye_last;

  coarse_search u_coarse (
    .clk(sys_clk), .rst_n(rst_n), .start(cs_start), .lambda_init(cs_lambda_init),
    .tau_start(cs_tau_start), .tau_lambda(cs_tau_lambda), .tau_done(tau_done),
    .eye_start(cs_eye_start), .eye_first(cs_eye_first), .eye_last(cs_eye_last),
    .eye_done(eye_done), .eye_res(eye_res),
    .done(cs_done), .fail(cs_fail), .lambda_out(cs_lambda), .trials(coarse_trials));

  logic fc_start, fc_done, fc_wrapped, fc_tau_start, fc_eye_start;
  lambda_t fc_lambda_in, fc_lambda, fc_tau_lambda;
  addr_t fc_g1_first, fc_g1_last, fc_g2_first, fc_g2_last;
  addr_t fc_eye_first, fc_eye_last;

  fine_correct u_fine (
    .clk(sys_clk), .rst_n(rst_n), .start(fc_start), .lambda_in(fc_lambda_in),
    .g1_first(fc_g1_first), .g1_last(fc_g1_last),
    .g2_first(fc_g2_first), .g2_last(fc_g2_last),
    .eye_start(fc_eye_start), .eye_first(fc_eye_first), .eye_last(fc_eye_last),
    .eye_done(eye_done), .eye_res(eye_res),
    .tau_start(fc_tau_start), .tau_lambda(fc_tau_lambda), .tau_done(tau_done),
    .done(fc_done), .wrapped(fc_wrapped), .lambda_out(fc_lambda));

  main_fsm #(.N_SAMPLES(N_SAMPLES), .FINE_STAGES(FINE_STAGES)) u_main (
    .clk(sys_clk), .rst_n(rst_n), .start(start), .use_locked(use_locked),
    .busy(busy), .done(done), .fail(fail), .lambda_out(lambda_out),
    .sh_enable(sh_enable), .cap_start(cap_start), .cap_done(cap_done),
    .est_clr(est_clr), .est_enable(est_enable), .est_done(est_done),
    .est_value(lambda_est),
    .cs_start(cs_start), .cs_lambda_init(cs_lambda_init), .cs_done(cs_done),
    .cs_fail(cs_fail), .cs_lambda(cs_lambda),
    .cs_tau_start(cs_tau_start), .cs_tau_lambda(cs_tau_lambda),
    .cs_eye_start(cs_eye_start), .cs_eye_first(cs_eye_first), .cs_eye_last(cs_eye_last),
    .fc_start(fc_start), .fc_lambda_in(fc_lambda_in),
    .fc_g1_first(fc_g1_first), .fc_g1_last(fc_g1_last),
    .fc_g2_first(fc_g2_first), .fc_g2_last(fc_g2_last),
    .fc_done(fc_done), .fc_lambda(fc_lambda),
    .fc_tau_start(fc_tau_start), .fc_tau_lambda(fc_tau_lambda),
    .fc_eye_start(fc_eye_start), .fc_eye_first(fc_eye_first), .fc_eye_last(fc_eye_last),
    .tau_start(tau_start), .tau_lambda(tau_lambda),
    .eye_start(eye_start), .eye_first(eye_first), .eye_last(eye_last),
    .eye_hires(eye_hires));

  // wrap-around flags of the two fine correction phases
  always_ff @(posedge sys_clk or negedge rst_n) begin
    if (!rst_n) fine_wrapped <= '0;
    else if (start && !busy) fine_wrapped <= '0;
    else if (fc_done) fine_wrapped <= {fine_wrapped[0], fc_wrapped};
  end

endmodule
