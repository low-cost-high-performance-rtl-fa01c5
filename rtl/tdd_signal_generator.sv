// tdd_signal_generator: produces the TDD switching signal.
//
// tdd_out = 1 selects DL (DL path on, UL path off), 0 selects UL. A
// delayed sync (taken on the tick it arrives on, or the next one) restarts a frame phase counter and
// latches the current mode, so a mode change takes effect at a frame
// boundary. The DL window runs from phase BASE_US + rise_off to
// BASE_US + total + fall_off, where total = DL + TTG/2 + RTG/2 of the mode
// (3539, 3193 or 2848 us); the rest of the frame is UL. BASE_US leaves room
// for negative trims and is part of t_d,GEN. While en is low the output
// rests in DL, as the repeater starts in DL, and pa_en is low so that the
// DL power amplifier stays off until switching works. The window lengths
// and the start-in-DL rule follow the document; the phase counter and the
// trim mechanism are this design's.
module tdd_signal_generator
  import tdd_pkg::*;
#(
  parameter int unsigned BASE_US = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  tick,
  input  logic  en,
  input  logic  dsync,
  input  mode_e mode,
  input  trim_t rise_off,
  input  trim_t fall_off,
  output logic  tdd_out,
  output logic  pa_en
);
  logic  take, pend, started;
  us_t   phase;
  mode_e fmode;
  int    rise_at, fall_at;
  logic  dl_win;

  always_comb begin
    rise_at = int'(BASE_US) + int'(rise_off);
    fall_at = int'(BASE_US) + int'(total_us(fmode)) + int'(fall_off);
    dl_win  = started && (fmode != MODE_NONE) &&
              (int'(phase) >= rise_at) && (int'(phase) < fall_at);
  end

  // a sync arriving on a tick is taken on that tick
  always_comb take = pend | dsync;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend    <= 1'b0;
      started <= 1'b0;
      phase   <= '0;
      fmode   <= MODE_NONE;
      tdd_out <= 1'b1;
      pa_en   <= 1'b0;
    end else begin
      pend <= pend | dsync;
      if (!en) begin
        started <= 1'b0;
        tdd_out <= 1'b1;
        pa_en   <= 1'b0;
      end else if (tick) begin
        pend <= 1'b0;
        if (take) begin
          started <= 1'b1;
          phase   <= '0;
          fmode   <= mode;
        end else if (phase != '1) begin
          phase <= phase + 1'b1;
        end
        tdd_out <= started ? dl_win : 1'b1;
        pa_en   <= started;
      end
    end
  end
endmodule
