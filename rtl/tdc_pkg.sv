`timescale 1ps/1fs
// tdc_pkg: constants and types shared by the TDC blocks.
//
// A hit time is a 26-bit timestamp in units of 1/4096 of the 375 MHz
// sampling-clock period (about 0.65 ps): the upper 14 bits are the coarse
// clock count, the lower 12 bits the calibrated fine time. The 375 MHz clock,
// the 256-hit L1 depth, the 16 channels and the roughly 145 taps per clock
// period come from the design description. The 14-bit coarse counter gives the
// 43.7 us (16384 x 2.667 ns) time range quoted for the L1 buffer. The 12-bit
// fine field (one step per calibration phase, 4096 per clock), the 192-tap
// line length and the 9-bit virtual bin id are choices of this implementation.
package tdc_pkg;

  localparam int unsigned COARSE_BITS = 14;
  localparam int unsigned FINE_BITS   = 12;
  localparam int unsigned TS_BITS     = COARSE_BITS + FINE_BITS;
  localparam int unsigned CH_BITS     = 4;

  typedef logic [COARSE_BITS-1:0] coarse_t;
  typedef logic [FINE_BITS-1:0]   fine_t;
  typedef logic [TS_BITS-1:0]     ts_t;

  // One entry of a channel's L1 buffer.
  typedef struct packed {
    logic trailing;  // 1: trailing-edge line, 0: leading-edge line
    ts_t  ts;        // hit timestamp
  } l1_hit_t;

  // One word of the readout stream: a hit relative to the common stop.
  typedef struct packed {
    logic [CH_BITS-1:0] ch;
    logic               trailing;
    ts_t                dt;        // stop time minus hit time
  } tdc_word_t;

endpackage
