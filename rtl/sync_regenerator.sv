// sync_regenerator: turns the detected frame starts into a steady sync.
//
// A free-running frame counter of PERIOD ticks emits sync_out at every
// frame start, so the sync keeps coming while the sync generator is
// re-acquiring. A detected sync that lands within TOL_US of the counter's
// frame start pulls the counter onto it. A detected sync that lands
// elsewhere is a new synchronization: once REALIGN_N of them have come in a
// row the counter jumps to it (realign pulses). If HOLD_FRAMES frames go by
// without any detected sync, valid drops and the counter waits for the next
// one. The document names this block and its task (cope with a missed,
// wrong or new sync); the flywheel counter and its limits are this design's.
// sync_in is taken on the tick it arrives on, or the next one; sync_out is a one-clock pulse on the
// clock after a tick.
module sync_regenerator
  import tdd_pkg::*;
#(
  parameter int unsigned PERIOD      = PERIOD_US,
  parameter int unsigned TOL_US      = 8,
  parameter int unsigned REALIGN_N   = 4,
  parameter int unsigned HOLD_FRAMES = 1000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  input  logic clear,
  input  logic sync_in,
  output logic sync_out,
  output logic valid,
  output logic realign
);
  localparam int unsigned RW = $clog2(REALIGN_N + 1);
  localparam int unsigned HW = $clog2(HOLD_FRAMES + 1);

  logic take, pend;
  us_t  phase, elapsed;
  logic [RW-1:0] mis;
  logic [HW-1:0] hold;
  logic early, late, wrap;

  always_comb begin
    elapsed = phase + 1'b1;
    wrap    = (elapsed >= us_t'(PERIOD));
    early   = (elapsed >= us_t'(PERIOD - TOL_US));
    late    = (elapsed <= us_t'(TOL_US));
  end

  // a sync arriving on a tick is taken on that tick
  always_comb take = pend | sync_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend     <= 1'b0;
      phase    <= '0;
      valid    <= 1'b0;
      mis      <= '0;
      hold     <= '0;
      sync_out <= 1'b0;
      realign  <= 1'b0;
    end else begin
      sync_out <= 1'b0;
      realign  <= 1'b0;
      if (clear) begin
        pend  <= 1'b0;
        valid <= 1'b0;
        mis   <= '0;
        hold  <= '0;
      end else begin
        pend <= pend | sync_in;
        if (tick) begin
          pend <= 1'b0;
          if (!valid) begin
            if (take) begin
              valid    <= 1'b1;
              phase    <= '0;
              sync_out <= 1'b1;
              hold     <= '0;
              mis      <= '0;
            end
          end else if (take) begin
            hold <= '0;
            if (early) begin
              // on time or slightly early: the frame starts now
              phase    <= '0;
              sync_out <= 1'b1;
              mis      <= '0;
            end else if (late) begin
              // slightly late: the frame already started, pull it back
              phase <= '0;
              mis   <= '0;
            end else if ((RW+1)'(mis) + 1'b1 >= (RW+1)'(REALIGN_N)) begin
              phase    <= '0;
              sync_out <= 1'b1;
              realign  <= 1'b1;
              mis      <= '0;
            end else begin
              mis   <= mis + 1'b1;
              phase <= elapsed;
            end
          end else if (wrap) begin
            phase    <= '0;
            sync_out <= 1'b1;
            if ((HW+1)'(hold) + 1'b1 >= (HW+1)'(HOLD_FRAMES)) valid <= 1'b0;
            else hold <= hold + 1'b1;
          end else begin
            phase <= elapsed;
          end
        end
      end
    end
  end
endmodule
