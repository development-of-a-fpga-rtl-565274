`timescale 1ps/1fs
// tdl_encoder: turns the delay line's flip-flop snapshot into a hit flag and
// a binary bin id.
//
// Tap 0 is nearest the input, so after a rising edge the snapshot reads
// 1..1 0..0 and the front edge is where the first 1-to-0 step lies. The
// encoder marks every tap i with taps[i] = 1 and taps[i+1] = 0 and takes the
// lowest mark; the front position is its index plus one. Taking the lowest
// step matters: further down the chain the line may still hold older parts of
// the signal (for the trailing-edge line, the level before a short pulse).
//
// Plain mode (WAVE_UNION = 0): a hit is the first snapshot in which tap 0 is
// set after one in which it was clear; the bin id is the front-edge position.
//
// Wave-union mode (WAVE_UNION = 1): the launcher sends a short pulse, so the
// snapshot reads 0..0 1..1 0..0 once the pulse has fully entered the chain.
// A hit is reported in the first snapshot that holds the whole pulse, where
// the previous one held only its front or nothing; the bin id is the sum of
// the front position (highest set tap + 1) and the rear position (lowest set
// tap). Summing both edges is the wave-union scheme of the design description;
// the detection rule is this implementation's choice.
//
// The description asks for the front edge to be "encoded in a binary code"
// but gives no encoder circuit; two priority encoders are used here.
//
// Timing: one register stage. `hit`, `bin` and `coarse_out` are valid one
// clock after the snapshot `taps`; `coarse_out` is `coarse_in` as it was when
// that snapshot was presented, so it names the clock edge that took the
// snapshot (one cycle late, the same for every line).
module tdl_encoder #(
  parameter int unsigned N_TAPS     = 192,
  parameter int unsigned BIN_BITS   = 9,
  parameter bit          WAVE_UNION = 1'b1
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [N_TAPS-1:0]   taps,
  input  tdc_pkg::coarse_t    coarse_in,
  output logic                hit,
  output logic [BIN_BITS-1:0] bin,
  output tdc_pkg::coarse_t    coarse_out
);

  logic [N_TAPS-1:0]   prev;
  logic [BIN_BITS-1:0] front, rear;
  logic                det;

  logic [N_TAPS-1:0] step;   // 1-to-0 steps along the chain

  assign step = taps & ~{1'b0, taps[N_TAPS-1:1]};

  // Front: lowest step + 1 (0 when none). Rear: lowest set tap.
  always_comb begin
    front = '0;
    rear  = '0;
    for (int i = N_TAPS - 1; i >= 0; i--) begin
      if (step[i]) front = BIN_BITS'(i + 1);
      if (taps[i]) rear  = BIN_BITS'(i);
    end
  end

  always_comb begin
    if (WAVE_UNION) det = !taps[0] && (|taps) && (prev[0] || !(|prev));
    else            det = taps[0] && !prev[0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      prev       <= '0;
      hit        <= 1'b0;
      bin        <= '0;
      coarse_out <= '0;
    end else begin
      prev       <= taps;
      hit        <= det;
      bin        <= WAVE_UNION ? BIN_BITS'(front + rear) : front;
      coarse_out <= coarse_in;
    end
  end

endmodule
