// reg_ram: memory modelled as a register array, one write port and one
// read port, each on its own clock.
//
// Writes take effect at the rising edge of wclk when we is high; reads are
// registered: rdata shows mem[raddr] one rclk cycle after raddr. Writes to
// addresses at or beyond DEPTH are dropped. The sample and tau stores of
// the reconstruction system are two instances of 3072 x 8 bits; a real
// chip would use an SRAM macro in its place.
module reg_ram #(
  parameter int unsigned DEPTH = 3072,
  parameter int unsigned WIDTH = 8,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             wclk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rclk,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge wclk) begin
    if (we && (32'(waddr) < DEPTH)) mem[waddr] <= wdata;
  end

  always_ff @(posedge rclk) begin
    rdata <= (32'(raddr) < DEPTH) ? mem[raddr] : '0;
  end

endmodule
