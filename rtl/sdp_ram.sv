`timescale 1ps/1fs
// sdp_ram: simple dual-port RAM with one write port and one registered read
// port, the shape of an FPGA block RAM.
//
// A write takes effect at the clock edge; a read of the same address in the
// same cycle returns the old contents (read-first). Read data appear one clock
// after `raddr`. The contents start undefined, so the users clear what they read.
module sdp_ram #(
  parameter int unsigned ADDR_BITS = 9,
  parameter int unsigned DATA_BITS = 18
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [ADDR_BITS-1:0] waddr,
  input  logic [DATA_BITS-1:0] wdata,
  input  logic [ADDR_BITS-1:0] raddr,
  output logic [DATA_BITS-1:0] rdata
);

  logic [DATA_BITS-1:0] mem [2**ADDR_BITS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
