`timescale 1ps/1fs
// l1_buffer: multi-hit buffer of one TDC channel.
//
// Every hit of the channel's leading-edge and trailing-edge lines is written,
// with its timestamp and a flag telling which edge it is, into a ring of DEPTH
// entries held in one block RAM. Writing never stops, so the channel has no
// dead time; when the ring is full the oldest hit is overwritten. The 256-hit
// depth shared by both edges and the no-dead-time pipeline follow the design
// description. The rest is this design's own: a small merge queue, a trigger
// search and a window.
//
// Merge queue: both lines may report a hit in the same clock, while the RAM
// takes one write per clock, so a 4-entry queue (leading first) sits in front
// of it. If it is full a hit is dropped and `lost` is set until reset; at the
// line's maximum rate of one hit per clock per edge this cannot happen for
// bursts shorter than the queue.
//
// Trigger search: `trig` with `trig_ts` (the common-stop time) starts a
// search, TRIG_DELAY clocks later so that hits already in the queue reach the
// RAM. The search walks from the newest entry towards the oldest. An entry at
// most LATE_CYCLES later than the stop is skipped; one within WINDOW_CYCLES
// clock periods before the stop is sent out as `out` = {trailing, stop - hit};
// the first entry older than the window, or the oldest valid entry, ends the
// search. Entries overwritten by hits written during the search are not read.
// A trigger arriving during a search is ignored (`busy` is high). `done`
// pulses when the search ends.
//
// Timestamps wrap every 2^14 clocks, so an entry a whole range old would look
// young again. To rule this out, a counter measures the quiet time since the
// last write. An entry written after WINDOW_CYCLES or more of quiet gets a
// `gap` mark, and the search ends after a marked entry. A search that starts
// after WINDOW_CYCLES of quiet reads nothing. Every entry examined is then less
// than 2 x WINDOW_CYCLES old, which is at most one range for
// WINDOW_CYCLES <= 2^13.
//
// Timing: `out_valid`/`out_ready` is a valid/ready handshake; one entry is
// examined every two clocks while the output is not stalled.
module l1_buffer #(
  parameter int unsigned DEPTH         = 256,
  parameter int unsigned WINDOW_CYCLES = 8192,
  parameter int unsigned TRIG_DELAY    = 4,
  parameter int unsigned LATE_CYCLES   = 64
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               lead_valid,
  input  tdc_pkg::ts_t       lead_ts,
  input  logic               trail_valid,
  input  tdc_pkg::ts_t       trail_ts,
  input  logic               trig,
  input  tdc_pkg::ts_t       trig_ts,
  output logic               out_valid,
  input  logic               out_ready,
  output tdc_pkg::l1_hit_t   out,
  output logic               busy,
  output logic               done,
  output logic               lost
);

  import tdc_pkg::*;

  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned QD = 4;
  localparam ts_t WINDOW = ts_t'(WINDOW_CYCLES) << FINE_BITS;
  localparam ts_t LATE   = ts_t'(0) - (ts_t'(LATE_CYCLES) << FINE_BITS);
  localparam int unsigned QW = $clog2(WINDOW_CYCLES + 1);

  if (WINDOW_CYCLES > 2**(COARSE_BITS - 1) || WINDOW_CYCLES == 0) begin : g_bad_window
    $error("l1_buffer: WINDOW_CYCLES must be 1 .. half the timestamp range");
  end

  typedef struct packed {
    logic    gap;   // written after WINDOW_CYCLES or more without a write
    l1_hit_t hit;
  } entry_t;

  // ---------------- merge queue ----------------
  l1_hit_t          q [QD];
  logic [1:0]       q_rd, q_wr;
  logic [2:0]       q_cnt;
  logic             q_pop;

  assign q_pop = (q_cnt != 0);

  always_ff @(posedge clk) begin
    if (rst) begin
      q_rd  <= '0;
      q_wr  <= '0;
      q_cnt <= '0;
      lost  <= 1'b0;
    end else begin
      automatic logic [2:0] room  = 3'(QD) - q_cnt + 3'(q_pop);
      automatic logic [1:0] wr    = q_wr;
      automatic logic [2:0] added = '0;
      if (lead_valid) begin
        if (added < room) begin
          q[wr] <= '{trailing: 1'b0, ts: lead_ts};
          wr    = wr + 1'b1;
          added = added + 1'b1;
        end else lost <= 1'b1;
      end
      if (trail_valid) begin
        if (added < room) begin
          q[wr] <= '{trailing: 1'b1, ts: trail_ts};
          wr    = wr + 1'b1;
          added = added + 1'b1;
        end else lost <= 1'b1;
      end
      q_wr  <= wr;
      q_rd  <= q_rd + 2'(q_pop);
      q_cnt <= q_cnt + added - 3'(q_pop);
    end
  end

  // ---------------- ring RAM ----------------
  logic [AW-1:0] wptr, rptr;
  logic [AW:0]   fill;
  logic [QW-1:0] quiet;      // clocks since the last write, saturating
  logic          quiet_max;
  entry_t        rdata, wentry;

  assign quiet_max = (quiet == QW'(WINDOW_CYCLES));

  assign wentry = '{gap: quiet_max, hit: q[q_rd]};

  sdp_ram #(.ADDR_BITS(AW), .DATA_BITS($bits(entry_t))) u_ram (
    .clk, .we(q_pop), .waddr(wptr), .wdata(wentry), .raddr(rptr), .rdata
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr  <= '0;
      fill  <= '0;
      quiet <= QW'(WINDOW_CYCLES);
    end else if (q_pop) begin
      wptr  <= wptr + 1'b1;
      quiet <= '0;
      if (fill != (AW+1)'(DEPTH)) fill <= fill + 1'b1;
    end else if (!quiet_max) begin
      quiet <= quiet + 1'b1;
    end
  end

  // ---------------- trigger search ----------------
  typedef enum logic [2:0] {S_IDLE, S_WAIT, S_ISSUE, S_CHECK, S_OUT, S_DONE} sstate_t;
  sstate_t       st;
  ts_t           stop_ts, dt;
  logic [7:0]    wait_cnt;
  logic [AW:0]   avail, walked, written;
  logic          last_gap;   // the entry on offer ends the search

  assign dt = stop_ts - rdata.hit.ts;

  always_ff @(posedge clk) begin
    if (rst) begin
      st        <= S_IDLE;
      stop_ts   <= '0;
      wait_cnt  <= '0;
      rptr      <= '0;
      avail     <= '0;
      walked    <= '0;
      written   <= '0;
      out_valid <= 1'b0;
      out       <= '0;
      last_gap  <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (q_pop && written != (AW+1)'(DEPTH)) written <= written + 1'b1;
      unique case (st)
        S_IDLE: if (trig) begin
          stop_ts  <= trig_ts;
          wait_cnt <= 8'(TRIG_DELAY);
          st       <= S_WAIT;
        end
        S_WAIT: begin
          if (wait_cnt == 0) begin
            rptr    <= wptr - 1'b1;
            avail   <= (quiet_max && !q_pop) ? '0 : fill;
            walked  <= '0;
            written <= (AW+1)'(q_pop);
            st      <= S_ISSUE;
          end else wait_cnt <= wait_cnt - 1'b1;
        end
        S_ISSUE: begin
          if (walked >= avail || (AW+2)'(walked) + (AW+2)'(written) >= (AW+2)'(DEPTH))
            st <= S_DONE;
          else
            st <= S_CHECK;     // RAM reads rptr this cycle
        end
        S_CHECK: begin
          if (dt >= LATE) begin                  // later than the stop: skip
            rptr   <= rptr - 1'b1;
            walked <= walked + 1'b1;
            st     <= rdata.gap ? S_DONE : S_ISSUE;
          end else if (dt < WINDOW) begin
            out       <= '{trailing: rdata.hit.trailing, ts: dt};
            out_valid <= 1'b1;
            last_gap  <= rdata.gap;
            st        <= S_OUT;
          end else begin
            st <= S_DONE;
          end
        end
        S_OUT: if (out_ready) begin
          out_valid <= 1'b0;
          rptr      <= rptr - 1'b1;
          walked    <= walked + 1'b1;
          st        <= last_gap ? S_DONE : S_ISSUE;
        end
        S_DONE: begin
          done <= 1'b1;
          st   <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st != S_IDLE);

  // An entry that is offered stays offered until it is taken.
  a_hold: assert property (@(posedge clk) disable iff (rst)
                           out_valid && !out_ready |=> out_valid && $stable(out));

endmodule
