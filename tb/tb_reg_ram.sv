// Self-checking testbench for reg_ram: random writes on one clock, reads
// on another, compared with a model array; read data must appear one read
// clock after the address; out-of-range writes must be dropped.
`timescale 1ns/1ps
module tb_reg_ram;
  localparam int DEPTH = 3072;
  logic wclk = 0, rclk = 0, we = 0;
  logic [11:0] waddr = 0, raddr = 0;
  logic [7:0] wdata = 0, rdata;
  logic [7:0] model [DEPTH];
  int checks = 0, failures = 0;

  reg_ram #(.DEPTH(DEPTH), .WIDTH(8)) dut (.*);

  always #2.5 wclk = ~wclk;
  always #6.5 rclk = ~rclk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge wclk); we = 1; waddr = 12'(a); wdata = 8'($urandom); model[a] = wdata;
    end
    repeat (2000) begin
      @(negedge wclk); waddr = 12'($urandom_range(0, DEPTH - 1)); wdata = 8'($urandom);
      model[waddr] = wdata;
    end
    // out of range write must not alias
    @(negedge wclk); waddr = 12'd3072 + 12'($urandom_range(0, 1000)); wdata = 8'hA5;
    @(negedge wclk); we = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge rclk); raddr = 12'($urandom_range(0, DEPTH - 1));
      @(posedge rclk); #1;
      checks++;
      if (rdata !== model[raddr]) begin
        failures++; $display("FAIL addr %0d got %0h exp %0h", raddr, rdata, model[raddr]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
