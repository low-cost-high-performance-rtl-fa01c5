// resync_controller: starts a re-acquisition when synchronization is lost.
//
// Two events lead to a new acquisition:
//  * loss (no stable frame for the loss time): full_clear pulses, clearing
//    the level comparator, the mode selector, the sync generator and the
//    regenerator, so the synchronizer starts again from nothing;
//  * desync: the sync generator has had to force its sync MISS frames in
//    a row (sg_lost) although the input frames are still stable, so the
//    frame start has moved. sg_clear pulses and the sync generator takes a
//    new reference, while the regenerator holds the old timing until it
//    sees the new one.
// After a desync clear, no further one is issued until the sync generator
// tracks again. resyncs counts desync clears. The document names the block;
// these rules are this design's.
module resync_controller (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       loss,
  input  logic       sg_lost,
  input  logic       sg_tracking,
  input  logic       stable,
  output logic       sg_clear,
  output logic       full_clear,
  output logic [7:0] resyncs
);
  logic waiting;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      waiting    <= 1'b0;
      sg_clear   <= 1'b0;
      full_clear <= 1'b0;
      resyncs    <= '0;
    end else begin
      sg_clear   <= 1'b0;
      full_clear <= 1'b0;
      if (loss) begin
        full_clear <= 1'b1;
        waiting    <= 1'b0;
      end else if (waiting) begin
        if (sg_tracking && !sg_clear) waiting <= 1'b0;
      end else if (sg_lost && stable) begin
        sg_clear <= 1'b1;
        waiting  <= 1'b1;
        if (resyncs != 8'hFF) resyncs <= resyncs + 1'b1;
      end
    end
  end
endmodule
