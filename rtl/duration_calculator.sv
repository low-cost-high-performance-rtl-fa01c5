// duration_calculator: measures the filtered envelope frame by frame.
//
// Counting 1 us ticks, it measures how long the signal stays at logic 1
// (the DL region) and the time between two rising edges (the frame
// period). At every rising edge after the first complete cycle it pulses
// meas_valid for one clock, with high_us holding the last logic-1 duration
// and period_us the time since the previous rising edge. Counters saturate
// at the top of us_t, so a lost signal reads as a very long period. What
// is measured follows the document; the counting details are this design's.
module duration_calculator
  import tdd_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  input  logic sig,         // filtered envelope
  output logic meas_valid,  // one clock, at a rising edge of sig
  output us_t  high_us,
  output us_t  period_us
);
  logic prev;
  logic seen_rise;   // a first rising edge has been seen
  logic seen_fall;   // a falling edge followed it
  us_t  cnt_period, cnt_high, high_len;

  function automatic us_t sat_inc(us_t v);
    return (v == '1) ? v : v + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev       <= 1'b0;
      seen_rise  <= 1'b0;
      seen_fall  <= 1'b0;
      cnt_period <= '0;
      cnt_high   <= '0;
      high_len   <= '0;
      meas_valid <= 1'b0;
      high_us    <= '0;
      period_us  <= '0;
    end else begin
      meas_valid <= 1'b0;
      if (tick) begin
        prev <= sig;
        if (sig && !prev) begin
          if (seen_rise && seen_fall) begin
            meas_valid <= 1'b1;
            high_us    <= high_len;
            period_us  <= cnt_period;
          end
          seen_rise  <= 1'b1;
          seen_fall  <= 1'b0;
          cnt_period <= us_t'(1);
          cnt_high   <= us_t'(1);
        end else begin
          cnt_period <= sat_inc(cnt_period);
          if (sig)
            cnt_high <= sat_inc(cnt_high);
          else if (prev) begin
            high_len  <= cnt_high;
            seen_fall <= seen_rise;
          end
        end
      end
    end
  end
endmodule
