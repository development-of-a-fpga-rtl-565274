`timescale 1ps/1fs
// readout_arbiter: merges the hit streams of the channels' L1 buffers into one
// stream of readout words tagged with the channel number.
//
// The design description does not say how the channels are read out; this
// is a plain round-robin arbiter. After a channel is served the search for the
// next request starts at the channel after it, so no channel can starve.
//
// Interface: per channel a valid/ready pair and an L1 entry; one output
// valid/ready pair carrying {channel, trailing, stop - hit}. The output is a
// register: a word is taken from a channel in the clock in which the output
// register is empty or being emptied, so up to one word per clock passes.
module readout_arbiter #(
  parameter int unsigned N_CH = 16
) (
  input  logic                           clk,
  input  logic                           rst,
  input  logic             [N_CH-1:0]    in_valid,
  output logic             [N_CH-1:0]    in_ready,
  input  tdc_pkg::l1_hit_t [N_CH-1:0]    in_data,
  output logic                           out_valid,
  input  logic                           out_ready,
  output tdc_pkg::tdc_word_t             out
);

  import tdc_pkg::*;

  localparam int unsigned IW = (N_CH > 1) ? $clog2(N_CH) : 1;

  logic [IW-1:0] next_ch, grant_ch;
  logic          any, take;

  // First requesting channel at or after next_ch.
  always_comb begin
    any      = 1'b0;
    grant_ch = '0;
    for (int k = N_CH - 1; k >= 0; k--) begin
      automatic logic [IW-1:0] c = IW'((int'(next_ch) + k) % N_CH);
      if (in_valid[c]) begin
        any      = 1'b1;
        grant_ch = c;
      end
    end
  end

  assign take = any && (!out_valid || out_ready);

  always_comb begin
    in_ready = '0;
    if (take) in_ready[grant_ch] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out       <= '0;
      next_ch   <= '0;
    end else begin
      if (take) begin
        out_valid   <= 1'b1;
        out.ch      <= CH_BITS'(grant_ch);
        out.trailing <= in_data[grant_ch].trailing;
        out.dt      <= in_data[grant_ch].ts;
        next_ch     <= (int'(grant_ch) == N_CH - 1) ? '0 : grant_ch + 1'b1;
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (rst)
                           out_valid && !out_ready |=> out_valid && $stable(out));

endmodule
