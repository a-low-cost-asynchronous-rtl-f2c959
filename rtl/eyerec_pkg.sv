// eyerec_pkg: constants and types shared by the asynchronous eye diagram
// reconstruction blocks.
//
// Number formats used throughout:
//   * lambda (the aliased frequency, a fraction of one data period per
//     sample) is an unsigned 18-bit fraction: 2^18 == one full period.
//     The width comes from 8 stored tau bits plus the 10-bit division by
//     1024 that the fine correction performs.
//   * tau (the reconstructed time position of a sample) is the top 8 bits
//     of the lambda accumulator: 256 == one period.
//   * y (a sample) is an 8-bit ADC code, 128 is the mid level.
// The open-eye criterion (MIN_RANGE, MAX_DEVIATION), the search step
// (2^-11 of a period) and the 512-trial limit follow the reference
// design; the bin counts per phase (32 / 64) and the sample group
// addresses follow its low / high resolution fine correction table.
package eyerec_pkg;

  localparam int unsigned SNAPSHOT_LEN = 3072;   // samples per snapshot
  localparam int unsigned ADDR_W    = 12;        // $clog2(N_SAMPLES)
  localparam int unsigned Y_W       = 8;         // ADC code width
  localparam int unsigned TAU_W     = 8;         // stored tau width
  localparam int unsigned LAMBDA_W  = 18;        // lambda / accumulator width
  localparam int unsigned EST_W     = 10;        // lambda estimator counters

  localparam logic [Y_W-1:0] Y_MID  = 8'd128;    // decision level of the eye

  typedef logic [ADDR_W-1:0]   addr_t;
  typedef logic [LAMBDA_W-1:0] lambda_t;
  typedef logic [TAU_W-1:0]    tau_t;
  typedef logic [Y_W-1:0]      y_t;

  // What the eye opening finder returns to the correction modules.
  typedef struct packed {
    logic [7:0] range;      // filtered max - filtered min of the opening ring
    logic [7:0] deviation;  // unfiltered max - filtered max
    tau_t       location;   // tau of the eye centre (filtered maximum)
  } eye_result_t;

  // True when an eye result meets the open-eye criterion.
  function automatic logic eye_is_open(logic [7:0] range, logic [7:0] deviation,
                                       logic [7:0] min_range, logic [7:0] max_dev);
    return (range >= min_range) && (deviation <= max_dev);
  endfunction

endpackage
