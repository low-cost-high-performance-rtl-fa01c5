// low_level_filter: cleans the UL region of the sampled envelope.
//
// Fading and noise put short logic-1 bursts into the UL region, where no
// downlink energy should be seen. The filter keeps the last TAPS samples
// (one per 1 us tick) in a shift register and a running count of the ones
// among them; the output is 1 only while at least THRESH of the TAPS
// samples are 1, so sparse 1 bursts are turned back into 0. The 64 taps
// follow the document; the k-of-n rule and the threshold are this design's
// choice (the document says the filter combination was found by experiment).
// Timing: the output rises THRESH ticks after a clean rising edge and falls
// TAPS-THRESH+1 ticks after a clean falling edge (registered, on tick).
module low_level_filter #(
  parameter int unsigned TAPS   = 64,
  parameter int unsigned THRESH = 40
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
      dout <= (ones_next >= CW'(THRESH));
    end
  end
endmodule
