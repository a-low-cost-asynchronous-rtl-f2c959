// eye_finder: measures the eye opening of a group of reconstructed
// samples and where it lies in the period.
//
// A start pulse (with first / last address and the resolution) clears the
// bins and requests a burst read from the memory controller. Each
// (tau, y) pair that arrives is binned by the top 5 (32 bins) or 6
// (hires, 64 bins) bits of tau; per bin the largest y below mid (128) and
// the smallest y at or above mid are kept. After the last pair:
//   * the opening of bin b is min_above(b) - max_below(b), or 0 when the
//     bin has no sample on one of the two sides;
//   * the ring of openings is smoothed by an 8-tap circular running
//     average built as push and pop: an accumulator is preloaded with
//     bins 0..7 (8 cycles), then for each of the M windows it is divided
//     by 8, compared, and the oldest bin is subtracted and the next added
//     (M cycles). The unfiltered maximum is tracked as bins leave the
//     window.
// Result (valid with the done pulse):
//   range     = filtered max - filtered min
//   deviation = unfiltered max - filtered max (large for a spurious peak)
//   location  = tau of the centre of the window with the first filtered
//               maximum, bin (i + 4) mod M scaled to 256 per period.
// Timing: 2 cycles to the first pair, one cycle per pair, then 1 + 8 + M
// cycles of filtering and 1 cycle to the done pulse. The binning, the
// filter and its push and pop form follow the reference design; empty
// bins reading as 0, the definition of range and the window centre are
// this implementation's choices.
// Even at 64 bins only the top 6 tau bits select a bin, so the two lowest
// rd_tau bits are never read (lint reports them as unused).
module eye_finder
  import eyerec_pkg::*;
#(
  parameter int unsigned BINS_LO = 32,
  parameter int unsigned BINS_HI = 64,
  parameter int unsigned TAPS    = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  addr_t       first,
  input  addr_t       last,
  input  logic        hires,
  // to / from the memory controller
  output logic        rd_start,
  output addr_t       rd_first,
  output addr_t       rd_last,
  input  logic        rd_valid,
  input  tau_t        rd_tau,
  input  y_t          rd_y,
  input  logic        rd_end,
  // result
  output logic        done,
  output eye_result_t result
);

  localparam int unsigned BW_HI  = $clog2(BINS_HI);
  localparam int unsigned BW_LO  = $clog2(BINS_LO);
  localparam int unsigned TAP_W  = $clog2(TAPS);
  localparam int unsigned ACC_W  = 8 + TAP_W;

  typedef enum logic [2:0] {S_IDLE, S_READ, S_PRELOAD, S_FILTER, S_DONE} state_t;
  state_t state;

  y_t          max_lo [BINS_HI];
  y_t          min_hi [BINS_HI];
  logic [BINS_HI-1:0] has_lo, has_hi;

  logic              hires_q;
  logic [BW_HI-1:0]  k;            // preload / window index
  logic [ACC_W-1:0]  acc;
  logic [7:0]        fmax, fmin, umax;
  logic [BW_HI-1:0]  imax;

  // ---- binning of incoming pairs ----
  logic [BW_HI-1:0] bin_in;
  assign bin_in = hires_q ? rd_tau[TAU_W-1 -: BW_HI]
                          : BW_HI'(rd_tau[TAU_W-1 -: BW_LO]);

  // ---- opening of a bin ----
  function automatic logic [7:0] opening(logic [BW_HI-1:0] b);
    if (has_lo[b] && has_hi[b]) return min_hi[b] - max_lo[b];
    else                        return 8'd0;
  endfunction

  logic [BW_HI-1:0] mask;          // M - 1
  logic [BW_HI-1:0] k_in;          // bin entering the window
  logic [7:0]       op_out, op_in, filt;
  assign mask   = hires_q ? BW_HI'(BINS_HI - 1) : BW_HI'(BINS_LO - 1);
  assign k_in   = (k + BW_HI'(TAPS)) & mask;
  assign op_out = opening(k);
  assign op_in  = opening(k_in);
  assign filt   = 8'(acc >> TAP_W);

  logic [BW_HI-1:0] centre;        // bin at the centre of the best window
  assign centre = (imax + BW_HI'(TAPS / 2)) & mask;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      hires_q  <= 1'b0;
      has_lo   <= '0;
      has_hi   <= '0;
      k        <= '0;
      acc      <= '0;
      fmax     <= '0;
      fmin     <= '0;
      umax     <= '0;
      imax     <= '0;
      rd_start <= 1'b0;
      rd_first <= '0;
      rd_last  <= '0;
      done     <= 1'b0;
      result   <= '0;
      for (int b = 0; b < BINS_HI; b++) begin
        max_lo[b] <= '0;
        min_hi[b] <= '0;
      end
    end else begin
      rd_start <= 1'b0;
      done     <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          hires_q  <= hires;
          has_lo   <= '0;
          has_hi   <= '0;
          rd_start <= 1'b1;
          rd_first <= first;
          rd_last  <= last;
          state    <= S_READ;
        end
        S_READ: if (rd_valid) begin
          if (rd_y < Y_MID) begin
            if (!has_lo[bin_in] || rd_y > max_lo[bin_in]) max_lo[bin_in] <= rd_y;
            has_lo[bin_in] <= 1'b1;
          end else begin
            if (!has_hi[bin_in] || rd_y < min_hi[bin_in]) min_hi[bin_in] <= rd_y;
            has_hi[bin_in] <= 1'b1;
          end
          if (rd_end) begin
            state <= S_PRELOAD;
            k     <= '0;
            acc   <= '0;
          end
        end
        S_PRELOAD: begin
          acc <= acc + ACC_W'(op_out);
          k   <= k + 1'b1;
          if (32'(k) == TAPS - 1) begin
            state <= S_FILTER;
            k     <= '0;
            fmax  <= '0;
            fmin  <= 8'hFF;
            umax  <= '0;
            imax  <= '0;
          end
        end
        S_FILTER: begin
          // window k .. k+TAPS-1 (mod M)
          if (filt > fmax) begin
            fmax <= filt;
            imax <= k;
          end
          if (filt < fmin) fmin <= filt;
          if (op_out > umax) umax <= op_out;
          acc <= acc - ACC_W'(op_out) + ACC_W'(op_in);
          k   <= k + 1'b1;
          if (k == mask) state <= S_DONE;
        end
        S_DONE: begin
          result.range     <= fmax - fmin;
          result.deviation <= umax - fmax;
          result.location  <= hires_q ? tau_t'(centre) << (TAU_W - BW_HI)
                                      : tau_t'(centre) << (TAU_W - BW_LO);
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
