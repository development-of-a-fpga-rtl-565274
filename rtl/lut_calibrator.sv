`timescale 1ps/1fs
// lut_calibrator: builds the bin-to-time look-up table of one delay line by a
// code density test, in one block RAM, and then serves look-ups from it.
//
// The bins of a carry chain differ in width. If hits arrive at random phases
// of the sampling clock, the number of hits falling in a bin is proportional
// to its width. The LUT-building sequence, started by `cal_start`, runs:
//   CLEAR      write 0 to every RAM word;
//   ACCUM      for each of 2^NCAL_LOG2 hits add one to RAM[bin] (a histogram);
//   INTEGRATE  sweep the RAM, replacing H[b] by 2*S[b] + H[b], where S[b] is
//              the number of hits in bins below b (the running integral, taken
//              at the middle of bin b);
//   NORMALIZE  sweep again, scaling by 2^FINE_BITS / (2 * 2^NCAL_LOG2), a
//              right shift because the hit count is a power of two.
// RAM[b] then holds the time from the hit to the sampling edge, in units of
// 1/2^FINE_BITS of a clock period. Bins above the highest one that received
// hits are set to 0, as in the published calibration curves. Histogram,
// integration and normalisation in one block RAM follow the design
// description; the mid-bin point, the power-of-two hit count (default
// 65536, 16 per calibration phase) and the RAM word width are this design's
// choices.
//
// Interface: `hit`/`bin` from the encoder. During calibration hits are
// histogrammed and no look-ups are answered. Otherwise each hit reads
// RAM[bin], and `fine_valid`/`fine` follow one clock later. `cal_done` is set
// once a LUT has been built. Two hits to the same bin in consecutive cycles
// are handled by forwarding the word being written.
module lut_calibrator #(
  parameter int unsigned BIN_BITS  = 9,
  parameter int unsigned FINE_BITS = tdc_pkg::FINE_BITS,
  parameter int unsigned NCAL_LOG2 = 16
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 cal_start,
  input  logic                 hit,
  input  logic [BIN_BITS-1:0]  bin,
  output logic                 cal_busy,
  output logic                 cal_done,
  output logic                 fine_valid,
  output logic [FINE_BITS-1:0] fine
);

  localparam int unsigned W     = NCAL_LOG2 + 2;      // holds 2 * hit count
  localparam int unsigned SHIFT = NCAL_LOG2 + 1 - FINE_BITS;
  localparam logic [W-1:0] NCAL = W'(1) << NCAL_LOG2;

  typedef enum logic [2:0] {IDLE, CLEAR, ACCUM, DRAIN, INTEGRATE, NORMALIZE} state_t;
  state_t state;

  logic                we;
  logic [BIN_BITS-1:0] waddr, raddr;
  logic [W-1:0]        wdata, rdata;

  sdp_ram #(.ADDR_BITS(BIN_BITS), .DATA_BITS(W)) u_ram (
    .clk, .we, .waddr, .wdata, .raddr, .rdata
  );

  logic [BIN_BITS-1:0] addr;        // sweep address / address read last cycle
  logic                rd_pending;  // a read was issued last cycle
  logic [W-1:0]        hits;        // histogram entries so far
  logic [W-1:0]        integ;       // running integral S
  logic                last_we;     // forwarding of the previous write
  logic [BIN_BITS-1:0] last_waddr;
  logic [W-1:0]        last_wdata;
  logic [W-1:0]        cur;         // rdata with forwarding applied
  logic                lookup;

  assign cur = (last_we && last_waddr == addr) ? last_wdata : rdata;

  // RAM read address: in the sweeps the word after the one being written
  // (the first word when nothing is pending), else the incoming bin.
  always_comb begin
    raddr = bin;
    if (state == INTEGRATE || state == NORMALIZE)
      raddr = rd_pending ? addr + 1'b1 : addr;
  end

  // Write port.
  always_comb begin
    we    = 1'b0;
    waddr = addr;
    wdata = '0;
    unique case (state)
      CLEAR: we = 1'b1;
      ACCUM, DRAIN: begin
        we    = rd_pending;
        wdata = cur + 1'b1;
      end
      INTEGRATE: begin
        we    = rd_pending;
        wdata = (integ == NCAL) ? '0 : ((integ << 1) + cur);
      end
      NORMALIZE: begin
        we    = rd_pending;
        wdata = cur >> SHIFT;
      end
      default: ;
    endcase
  end

  assign lookup = (state == IDLE) && hit && cal_done;

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= IDLE;
      addr       <= '0;
      rd_pending <= 1'b0;
      hits       <= '0;
      integ      <= '0;
      cal_done   <= 1'b0;
      last_we    <= 1'b0;
      last_waddr <= '0;
      last_wdata <= '0;
      fine_valid <= 1'b0;
    end else begin
      last_we    <= we;
      last_waddr <= waddr;
      last_wdata <= wdata;
      fine_valid <= lookup;
      rd_pending <= 1'b0;
      unique case (state)
        IDLE: begin
          if (cal_start) begin
            state    <= CLEAR;
            addr     <= '0;
            cal_done <= 1'b0;
          end
        end
        CLEAR: begin
          addr <= addr + 1'b1;
          if (addr == BIN_BITS'(2**BIN_BITS - 1)) begin
            state <= ACCUM;
            hits  <= '0;
          end
        end
        ACCUM: begin
          if (hit) begin
            addr       <= bin;
            rd_pending <= 1'b1;
            hits       <= hits + 1'b1;
            if (hits == NCAL - 1'b1) state <= DRAIN;
          end
        end
        DRAIN: begin        // last histogram write happens in this cycle
          state      <= INTEGRATE;
          addr       <= '0;
          integ      <= '0;
        end
        INTEGRATE: begin
          // Issue a read of addr+1 while writing addr (read of 0 issued first).
          if (!rd_pending) begin
            rd_pending <= 1'b1;
          end else begin
            integ <= integ + cur;
            if (addr == BIN_BITS'(2**BIN_BITS - 1)) begin
              state <= NORMALIZE;
              addr  <= '0;
            end else begin
              addr       <= addr + 1'b1;
              rd_pending <= 1'b1;
            end
          end
        end
        NORMALIZE: begin
          if (!rd_pending) begin
            rd_pending <= 1'b1;
          end else if (addr == BIN_BITS'(2**BIN_BITS - 1)) begin
            state    <= IDLE;
            cal_done <= 1'b1;
          end else begin
            addr       <= addr + 1'b1;
            rd_pending <= 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign cal_busy = (state != IDLE);
  assign fine     = rdata[FINE_BITS-1:0];

endmodule
