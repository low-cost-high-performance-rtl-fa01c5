// delay_controller: delays the frame sync by the system latency.
//
// The RF path and the digital path of the synchronizer delay the signal by
// different amounts, so the sync must wait before it can drive the RF
// switch. The wait is one frame period less the digital latency in excess
// of the RF latency, less the latency of the signal generation, as the
// document's equation (1) gives it:
//   t_d,TDD = t_period - (t_d,DIG - t_d,RF) - t_d,GEN
// In this design the TDD output must also enter DL RTG/2 (39 us) before
// the repeated DL starts, so that advance is taken off as well. The result
// is limited to 1 .. PERIOD-1 ticks. sync_in is taken on its tick (or the next) and
// loads the down-counter; dsync pulses for one clock t_d,TDD ticks later.
// A sync arriving before the count ends restarts it. The latencies come
// from the registers the external processor programs.
module delay_controller
  import tdd_pkg::*;
#(
  parameter int unsigned PERIOD  = PERIOD_US,
  parameter int unsigned ADVANCE = RTG_HALF_US
) (
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  input  logic sync_in,
  input  us_t  t_dig,
  input  us_t  t_rf,
  input  us_t  t_gen,
  output us_t  t_delay,   // the delay in use
  output logic dsync
);
  logic take, pend, armed;
  us_t  cnt;
  int   d;

  always_comb begin
    d = int'(PERIOD) - (int'(t_dig) - int'(t_rf)) - int'(t_gen) - int'(ADVANCE);
    if (d < 1) d = 1;
    if (d > int'(PERIOD) - 1) d = int'(PERIOD) - 1;
    t_delay = us_t'(d);
  end

  // a sync arriving on a tick is taken on that tick
  always_comb take = pend | sync_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend  <= 1'b0;
      armed <= 1'b0;
      cnt   <= '0;
      dsync <= 1'b0;
    end else begin
      dsync <= 1'b0;
      pend <= pend | sync_in;
      if (tick) begin
        pend <= 1'b0;
        if (take) begin
          armed <= 1'b1;
          cnt   <= t_delay;
        end else if (armed) begin
          if (cnt <= us_t'(1)) begin
            dsync <= 1'b1;
            armed <= 1'b0;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
      end
    end
  end
endmodule
