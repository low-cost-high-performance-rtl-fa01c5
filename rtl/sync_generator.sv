// sync_generator: finds the frame start and holds it with a signal mask.
//
// The rising edge of the filtered envelope marks the start of the DL
// region. While not tracking, the first rising edge seen while arm is high
// becomes the reference: sync pulses and tracking starts. From then on an
// edge is only accepted inside a change-allowable window of MASK_US ticks
// centred on the expected position, one PERIOD_US after the reference:
//   (A) an edge outside the window is ignored (ignored pulses);
//   (C) an edge inside the window is passed on as sync at once, and the
//       reference moves one tick towards it (none if it came on time);
//   (B) if no edge came, sync is forced when the window ends (forced
//       pulses); the reference then stays on the expected position, so
//       missing edges do not make the frame drift.
// miss_run counts forced syncs in a row; lost is high once it reaches
// MISS_N. clear drops tracking. The window of 4 us and the rules (A)-(C)
// follow the document; centring the window, keeping the reference on the
// expected position after a forced sync, the one-tick reference step and
// the lost count are this design's choices. The step lets the reference
// follow a clock offset of up to 1 tick per frame (200 ppm) while settling
// on the typical edge position, where taking each accepted edge as the
// new reference would let noisy edges walk it out of the window. sync is a
// one-clock pulse on the clock after the tick that decided it.
module sync_generator
  import tdd_pkg::*;
#(
  parameter int unsigned PERIOD = PERIOD_US,
  parameter int unsigned MASK_US = 4,
  parameter int unsigned MISS_N  = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  input  logic clear,
  input  logic arm,       // allowed to take a first reference
  input  logic sig,       // filtered envelope
  output logic sync,
  output logic tracking,
  output logic forced,    // sync was forced at the end of the window
  output logic ignored,   // an edge outside the window was ignored
  output logic lost
);
  localparam int unsigned HALF = MASK_US / 2;
  localparam int unsigned WIN_LO = PERIOD - HALF;
  localparam int unsigned WIN_HI = PERIOD - HALF + MASK_US - 1;
  localparam int unsigned MW = $clog2(MISS_N + 1);

  logic prev, rise;
  us_t  phase, elapsed, step_phase;
  logic in_win, win_end;
  logic [MW-1:0] miss_run;

  always_comb begin
    rise    = sig & ~prev;
    elapsed = phase + 1'b1;
    in_win  = (elapsed >= us_t'(WIN_LO)) && (elapsed <= us_t'(WIN_HI));
    win_end = (elapsed == us_t'(WIN_HI));
    lost    = (miss_run >= MW'(MISS_N));
    // phase of this tick after the reference moved by -1, 0 or +1 tick
    if (elapsed < us_t'(PERIOD))      step_phase = elapsed - us_t'(PERIOD - 1);
    else if (elapsed > us_t'(PERIOD)) step_phase = elapsed - us_t'(PERIOD + 1);
    else                              step_phase = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev     <= 1'b0;
      phase    <= '0;
      tracking <= 1'b0;
      sync     <= 1'b0;
      forced   <= 1'b0;
      ignored  <= 1'b0;
      miss_run <= '0;
    end else begin
      sync    <= 1'b0;
      forced  <= 1'b0;
      ignored <= 1'b0;
      if (clear) begin
        tracking <= 1'b0;
        miss_run <= '0;
        prev     <= 1'b1;   // an edge must be seen after the clear
      end else if (tick) begin
        prev <= sig;
        if (!tracking) begin
          if (arm && rise) begin
            sync     <= 1'b1;
            tracking <= 1'b1;
            phase    <= '0;
          end
        end else if (rise && in_win) begin
          // the reference moves one tick towards the edge
          sync     <= 1'b1;
          phase    <= step_phase;
          miss_run <= '0;
        end else if (win_end) begin
          sync     <= 1'b1;
          forced   <= 1'b1;
          phase    <= us_t'(WIN_HI - PERIOD);
          if (!lost) miss_run <= miss_run + 1'b1;
        end else begin
          phase <= elapsed;
          if (rise) ignored <= 1'b1;
        end
      end
    end
  end
endmodule
