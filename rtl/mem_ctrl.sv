// mem_ctrl: memory controller of the reconstruction system.
//
// It owns two N_SAMPLES x 8-bit stores, one for ADC samples (y) and one
// for reconstructed time positions (tau), and provides:
//   1. capture: after a cap_start pulse it writes N_SAMPLES consecutive
//      ADC codes, one per samp_clk rising edge, to addresses 0.. and then
//      pulses cap_done. The write side runs in the sampling clock domain;
//      the request and the completion cross with two-flop synchronisers
//      using a four-phase req/ack handshake.
//   2. tau write: tau_we / tau_addr / tau_wdata write the tau store
//      directly, one value per sys_clk cycle.
//   3. burst read: a rd_start pulse with rd_first..rd_last streams one
//      (tau, y) pair per cycle, rd_valid high, starting two cycles after
//      rd_start; rd_end marks the last pair.
//   4. host read: while no burst runs, host_tau / host_y show the pair at
//      host_addr one cycle after host_addr.
// The three functions 1-3 are those of the reference design; the sampling
// clock domain capture, the handshakes and the host port are this
// implementation's.
module mem_ctrl
  import eyerec_pkg::*;
#(
  parameter int unsigned N_SAMPLES = SNAPSHOT_LEN
) (
  input  logic  sys_clk,
  input  logic  samp_clk,
  input  logic  rst_n,
  // capture
  input  logic  cap_start,
  output logic  cap_done,
  input  y_t    adc_data,
  // tau write
  input  logic  tau_we,
  input  addr_t tau_addr,
  input  tau_t  tau_wdata,
  // burst read
  input  logic  rd_start,
  input  addr_t rd_first,
  input  addr_t rd_last,
  output logic  rd_valid,
  output tau_t  rd_tau,
  output y_t    rd_y,
  output logic  rd_end,
  // host read
  input  addr_t host_addr,
  output tau_t  host_tau,
  output y_t    host_y
);

  // ---------------- capture, sampling clock side ----------------
  logic       cap_req;                 // sys domain request
  logic [1:0] req_sync;                // request seen in samp domain
  logic       cap_ack;                 // samp domain acknowledge
  logic [1:0] ack_sync;                // ack seen in sys domain
  logic       cap_active;
  addr_t      waddr;

  always_ff @(posedge samp_clk or negedge rst_n) begin
    if (!rst_n) begin
      req_sync   <= '0;
      cap_ack    <= 1'b0;
      cap_active <= 1'b0;
      waddr      <= '0;
    end else begin
      req_sync <= {req_sync[0], cap_req};
      if (cap_active) begin
        if (32'(waddr) == N_SAMPLES - 1) begin
          cap_active <= 1'b0;
          cap_ack    <= 1'b1;
        end
        waddr <= waddr + 1'b1;
      end else if (req_sync[1] && !cap_ack) begin
        cap_active <= 1'b1;
        waddr      <= '0;
      end else if (!req_sync[1]) begin
        cap_ack <= 1'b0;
      end
    end
  end

  // ---------------- capture, system clock side ----------------
  always_ff @(posedge sys_clk or negedge rst_n) begin
    if (!rst_n) begin
      cap_req  <= 1'b0;
      ack_sync <= '0;
      cap_done <= 1'b0;
    end else begin
      ack_sync <= {ack_sync[0], cap_ack};
      cap_done <= 1'b0;
      if (cap_start && !cap_req && !ack_sync[1]) cap_req <= 1'b1;
      else if (cap_req && ack_sync[1]) begin
        cap_req  <= 1'b0;
        cap_done <= 1'b1;
      end
    end
  end

  // ---------------- burst read ----------------
  logic  bursting;
  addr_t raddr_cnt, last_q;
  logic  issue, issue_last;            // address issued this cycle
  addr_t raddr;

  always_ff @(posedge sys_clk or negedge rst_n) begin
    if (!rst_n) begin
      bursting  <= 1'b0;
      raddr_cnt <= '0;
      last_q    <= '0;
      rd_valid  <= 1'b0;
      rd_end    <= 1'b0;
    end else begin
      if (rd_start) begin
        bursting  <= 1'b1;
        raddr_cnt <= rd_first;
        last_q    <= rd_last;
      end else if (bursting) begin
        raddr_cnt <= raddr_cnt + 1'b1;
        if (raddr_cnt == last_q) bursting <= 1'b0;
      end
      // memory read data appears one cycle after the address
      rd_valid <= issue;
      rd_end   <= issue_last;
    end
  end

  assign issue      = bursting;
  assign issue_last = bursting && (raddr_cnt == last_q);
  assign raddr      = bursting ? raddr_cnt : host_addr;

  // ---------------- the two stores ----------------
  y_t   y_q;
  tau_t tau_q;

  reg_ram #(.DEPTH(N_SAMPLES), .WIDTH(Y_W), .AW(ADDR_W)) u_sample_mem (
    .wclk(samp_clk), .we(cap_active), .waddr(waddr), .wdata(adc_data),
    .rclk(sys_clk), .raddr(raddr), .rdata(y_q));

  reg_ram #(.DEPTH(N_SAMPLES), .WIDTH(TAU_W), .AW(ADDR_W)) u_tau_mem (
    .wclk(sys_clk), .we(tau_we), .waddr(tau_addr), .wdata(tau_wdata),
    .rclk(sys_clk), .raddr(raddr), .rdata(tau_q));

  assign rd_tau   = tau_q;
  assign rd_y     = y_q;
  assign host_tau = tau_q;
  assign host_y   = y_q;

endmodule
