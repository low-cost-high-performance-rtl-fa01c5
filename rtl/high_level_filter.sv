// high_level_filter: fills the DL region of the envelope.
//
// Inside the DL region fading makes the envelope drop to logic 0 for short
// stretches. The filter keeps the last TAPS samples (one per 1 us tick) and
// outputs 0 only while fewer than THRESH of them are 1: a stretch of zeros
// must last TAPS-THRESH+1 ticks before the output follows, so short
// drop-outs are turned back into 1. Working on a tap window like the
// low-level filter follows the document; the tap count and threshold of this
// filter are this design's choice. Timing: the output rises THRESH ticks
// after a clean rising edge and falls TAPS-THRESH+1 ticks after a clean
// falling edge.
module high_level_filter #(
  parameter int unsigned TAPS   = 64,
  parameter int unsigned THRESH = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  input  logic din,
  output logic dout
);
  localparam int unsigned CW = $clog2(TAPS + 1);
  logic [TAPS-1:0] taps;
  logic [CW-1:0]   ones;
  logic [CW-1:0]   ones_next;

  always_comb ones_next = ones + CW'(din) - CW'(taps[TAPS-1]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      taps <= '0;
      ones <= '0;
      dout <= 1'b0;
    end else if (tick) begin
      taps <= {taps[TAPS-2:0], din};
      ones <= ones_next;
      // Zeros must fill all but THRESH-1 taps before the output drops.
      dout <= (ones_next >= CW'(THRESH));
    end
  end
endmodule
