// input_interface: receives the TTL envelope of the downlink signal.
//
// The envelope comes from the analog detector and clamp, so it is
// asynchronous to the FPGA clock. Two flip-flops bring it into the clock
// domain, and the result is sampled once per 1 us tick for the filters.
// sig_out changes only on tick and is the input as seen at the previous
// tick; it lags tdd_in by 2 clocks plus up to one tick. rise/fall pulse on
// the tick where sig_out changes. The synchronizer depth and the 1 us
// sampling are this design's choices; the document only says the block
// receives the envelope converted into a TTL signal.
module input_interface (
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  input  logic tdd_in,   // asynchronous TTL envelope, 1 = DL energy
  output logic sig_out,  // sampled envelope
  output logic rise,
  output logic fall
);
  logic meta, sync;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta    <= 1'b0;
      sync    <= 1'b0;
      sig_out <= 1'b0;
      rise    <= 1'b0;
      fall    <= 1'b0;
    end else begin
      meta <= tdd_in;
      sync <= meta;
      rise <= 1'b0;
      fall <= 1'b0;
      if (tick) begin
        sig_out <= sync;
        rise    <= sync & ~sig_out;
        fall    <= ~sync & sig_out;
      end
    end
  end
endmodule
