// lambda_estimator: estimates the aliased fraction lambda by counting.
//
// Two 10-bit counters run from the two subrate clocks. The sampling-clock
// counter counts 2^CNT_W rising edges and then raises a sticky overflow
// and stops. By then the data counter has wrapped many times; what is
// left in it is mod(N_data, N_sample), which read as a CNT_W-bit binary
// fraction is lambda = mod(f_data, f_sample) / f_sample.
//
// Crossing the three clock domains:
//   * the overflow is re-timed on the falling edge of the data subrate
//     ("latch count"), half a data-subrate period after the data counter
//     last changed, so the count it latches is settled (off by one at
//     worst);
//   * latch count captures the data count on its rising edge;
//   * latch count passes a two-flop synchroniser into the system clock
//     domain; one cycle after it arrives the (long stable) latched count
//     is copied to lambda_est and done rises and stays high.
// clr (asynchronous, active high) clears everything; counting runs while
// enable is high. The counter / re-timing / synchroniser structure is the
// reference design's; the second synchroniser flop, the sticky overflow
// and the clear style are choices of this implementation.
module lambda_estimator #(
  parameter int unsigned CNT_W = 10
) (
  input  logic             samp_sub,       // sampling clock subrate
  input  logic             data_sub,       // data subrate
  input  logic             sys_clk,
  input  logic             clr,
  input  logic             enable,
  output logic [CNT_W-1:0] clock_count,
  output logic [CNT_W-1:0] data_count,
  output logic             data_overflow,
  output logic             done,
  output logic [CNT_W-1:0] lambda_est
);

  logic             samp_ovf;      // sampling counter reached 2^CNT_W
  logic             latch_count;   // overflow re-timed on data_sub fall
  logic [CNT_W-1:0] latched;       // data count captured by latch_count
  logic [1:0]       sync;          // latch_count in the sys_clk domain

  // Sampling subrate counter with sticky overflow.
  always_ff @(posedge samp_sub or posedge clr) begin
    if (clr) begin
      clock_count <= '0;
      samp_ovf    <= 1'b0;
    end else if (enable && !samp_ovf) begin
      {samp_ovf, clock_count} <= {1'b0, clock_count} + 1'b1;
    end
  end

  // Data subrate counter; wraps freely.
  always_ff @(posedge data_sub or posedge clr) begin
    if (clr) begin
      data_count    <= '0;
      data_overflow <= 1'b0;
    end else if (enable) begin
      data_count    <= data_count + 1'b1;
      data_overflow <= &data_count;
    end
  end

  // Overflow re-timed on the falling edge of the data subrate.
  always_ff @(negedge data_sub or posedge clr) begin
    if (clr) latch_count <= 1'b0;
    else     latch_count <= samp_ovf;
  end

  always_ff @(posedge latch_count or posedge clr) begin
    if (clr) latched <= '0;
    else     latched <= data_count;
  end

  // Synchroniser into the system clock domain.
  always_ff @(posedge sys_clk or posedge clr) begin
    if (clr) begin
      sync       <= '0;
      done       <= 1'b0;
      lambda_est <= '0;
    end else begin
      sync <= {sync[0], latch_count};
      if (sync[1] && !done) begin
        lambda_est <= latched;
        done       <= 1'b1;
      end
    end
  end

endmodule
