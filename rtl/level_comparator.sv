// level_comparator: decides whether the received frames are stable.
//
// Each measurement from the duration calculator is compared with the one
// before it. They agree when both the logic-1 duration and the period
// differ by at most TOL_US, and the measurement is plausible when the
// period lies within PERIOD_TOL_US of the 5 ms WiBro frame. After STABLE_N
// agreeing, plausible measurements in a row the signal counts as stable:
// from then on every further agreeing measurement gives a one-clock
// frame_ok pulse, with stable_high/stable_period holding its values. Any
// disagreement restarts the count. The compare-with-previous rule follows
// the document; the tolerances and the count are this design's choices.
module level_comparator
  import tdd_pkg::*;
#(
  parameter int unsigned TOL_US        = 10,
  parameter int unsigned PERIOD_TOL_US = 10,
  parameter int unsigned STABLE_N      = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,        // forget the history
  input  logic meas_valid,
  input  us_t  high_us,
  input  us_t  period_us,
  output logic frame_ok,     // one clock per stable frame
  output logic stable,
  output us_t  stable_high,
  output us_t  stable_period
);
  localparam int unsigned CW = $clog2(STABLE_N + 1);
  us_t prev_high, prev_period;
  logic have_prev;
  logic [CW-1:0] run;
  logic agree, plausible;

  function automatic logic close(us_t a, us_t b, us_t tol);
    return ((a >= b) ? (a - b) : (b - a)) <= tol;
  endfunction

  always_comb begin
    agree     = have_prev && close(high_us, prev_high, us_t'(TOL_US))
                          && close(period_us, prev_period, us_t'(TOL_US));
    plausible = close(period_us, us_t'(PERIOD_US), us_t'(PERIOD_TOL_US));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_high     <= '0;
      prev_period   <= '0;
      have_prev     <= 1'b0;
      run           <= '0;
      frame_ok      <= 1'b0;
      stable        <= 1'b0;
      stable_high   <= '0;
      stable_period <= '0;
    end else begin
      frame_ok <= 1'b0;
      if (clear) begin
        have_prev <= 1'b0;
        run       <= '0;
        stable    <= 1'b0;
      end else if (meas_valid) begin
        prev_high   <= high_us;
        prev_period <= period_us;
        have_prev   <= 1'b1;
        if (agree && plausible) begin
          if (run < CW'(STABLE_N)) run <= run + 1'b1;
          if ((CW+1)'(run) + 1'b1 >= (CW+1)'(STABLE_N)) begin
            stable        <= 1'b1;
            frame_ok      <= 1'b1;
            stable_high   <= high_us;
            stable_period <= period_us;
          end
        end else begin
          run    <= '0;
          stable <= 1'b0;
        end
      end
    end
  end
endmodule
