`timescale 1ps/1fs
// coarse_counter: free-running clock counter of the TDC.
//
// The coarse part of every timestamp is the number of sampling-clock (375 MHz)
// periods counted since reset. The counter wraps every 2^WIDTH periods; with the
// default 14 bits this is 16384 x 2.667 ns = 43.7 us, the time range of the hit
// buffer. One counter is shared by all delay lines so that their timestamps
// are comparable.
//
// Interface: `count` changes one cycle after each rising clock edge; a
// synchronous, active-high `rst` clears it. `en` (kept high in normal use)
// holds the count when low.
module coarse_counter #(
  parameter int unsigned WIDTH = tdc_pkg::COARSE_BITS
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  output logic [WIDTH-1:0] count
);

  always_ff @(posedge clk) begin
    if (rst)     count <= '0;
    else if (en) count <= count + 1'b1;
  end

endmodule
