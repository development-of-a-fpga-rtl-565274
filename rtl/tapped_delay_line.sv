`timescale 1ps/1fs
// tapped_delay_line: behavioural model of the carry-chain delay line and its
// D-flipflop array.
//
// Behavioural model, not synthesizable logic: the fine time comes from the
// propagation delays of the carry-chain multiplexers, which exist only in the
// FPGA's silicon. The model keeps the part's ports: the pulse from the
// launcher goes in, and the flip-flop array's snapshot comes out.
//
// The signal enters the chain and reaches tap i after delay(i), the sum of the
// bin widths of taps 0..i. At every rising edge of `clk` the flip-flop array
// stores, for every tap, the value the input had delay(i) earlier, so
// `taps[0]` holds the newest part of the input waveform. The bin widths are
// uneven, as in the real chain: each is MIN_BIN_PS plus a pseudo-random value
// below SPAN_PS, drawn from a generator seeded with SEED, so each line
// instance gets its own widths. The defaults (4 to 32 ps, mean 18 ps, about
// 148 taps per 2.667 ns period) follow the "about 145 taps" and the few-tens of
// ps bin widths given for the real chain. N_TAPS = 192 leaves room for the
// second edge of a wave union; the length is this model's choice.
//
// Timing: `taps` changes right after a rising edge of `clk`, like the
// outputs of the flip-flops it models.
module tapped_delay_line #(
  parameter int unsigned N_TAPS     = 192,
  parameter int unsigned SEED       = 1,
  parameter real         MIN_BIN_PS = 4.0,
  parameter int unsigned SPAN_PS    = 29,
  parameter real         OFFSET_PS  = 50.0
) (
  input  logic              clk,
  input  logic              din,
  output logic [N_TAPS-1:0] taps
);

  localparam int unsigned HIST = 16;  // input edges remembered

  real         tap_delay [N_TAPS];
  real         edge_time [HIST];
  logic        edge_val  [HIST];
  int unsigned edge_wr;

  initial begin
    automatic int unsigned s = SEED * 32'd2654435761 + 32'd12345;
    automatic real acc = OFFSET_PS;
    for (int i = 0; i < N_TAPS; i++) begin
      s = s * 32'd1103515245 + 32'd12345;
      acc += MIN_BIN_PS + real'((s >> 16) % SPAN_PS);
      tap_delay[i] = acc;
    end
    for (int k = 0; k < HIST; k++) begin
      edge_time[k] = -1.0e9;
      edge_val[k]  = 1'b0;
    end
    taps = '0;
    edge_wr = 0;
  end

  // Remember the latest input edges with their times.
  always @(din) begin
    edge_time[edge_wr % HIST] = $realtime;
    edge_val[edge_wr % HIST]  = din;
    edge_wr = edge_wr + 1;
  end

  // Walk the taps from the input outwards (later taps see older input) and
  // the remembered edges from the newest backwards, in one pass.
  always @(posedge clk) begin
    automatic real         now = $realtime;
    automatic int unsigned n   = (edge_wr < HIST) ? edge_wr : HIST;
    automatic int unsigned k   = 0;   // edges skipped, newest first
    automatic logic        v;
    if (n == 0) begin
      taps <= '0;
    end else if (edge_time[(edge_wr - 1) % HIST] <= now - tap_delay[N_TAPS-1]) begin
      taps <= {N_TAPS{edge_val[(edge_wr - 1) % HIST]}};  // no edge in the chain
    end else begin
      for (int i = 0; i < N_TAPS; i++) begin
        while (k < n && edge_time[(edge_wr - 1 - k) % HIST] > now - tap_delay[i]) k++;
        v = (k < n) ? edge_val[(edge_wr - 1 - k) % HIST] : 1'b0;
        taps[i] <= v;
      end
    end
  end

endmodule
