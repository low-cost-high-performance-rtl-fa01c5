// mode_selector: decides which DL:UL symbol split the base station uses.
//
// Every stable frame's logic-1 duration, less HIGH_BIAS_US (the widening
// the two filters add), is matched against the DL durations of the three
// modes (3456, 3110 and 2765 us for 30, 27 and 24 DL symbols). A duration
// more than MODE_TOL_US from all three is an abnormal symbol rate, as
// overlapping base stations can produce, and is ignored. The first valid
// mode is taken at once (the frames are already stable). A different
// valid mode replaces the current one only after CONFIRM_N stable frames
// in a row have shown it; mode_change then pulses for one clock. The three
// modes and the rejection of abnormal rates follow the document; the
// tolerance and the confirmation count (200 frames, 1 s, in line with the
// 1 to 2 s mode-change time reported) are this design's choices.
module mode_selector
  import tdd_pkg::*;
#(
  parameter int unsigned MODE_TOL_US  = 100,
  parameter int unsigned HIGH_BIAS_US = 34,
  parameter int unsigned CONFIRM_N    = 200
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,       // forget the mode
  input  logic  frame_ok,
  input  us_t   stable_high,
  output mode_e mode,
  output logic  mode_valid,
  output logic  mode_change, // one clock when a confirmed new mode is taken
  output logic  abnormal     // one clock when a stable frame matches no mode
);
  localparam int unsigned CW = $clog2(CONFIRM_N + 1);
  mode_e cand, pending;
  logic [CW-1:0] cnt;
  us_t dl;

  function automatic logic near(us_t a, int unsigned b, int unsigned tol);
    return ((int'(a) >= int'(b)) ? (int'(a) - int'(b)) : (int'(b) - int'(a))) <= int'(tol);
  endfunction

  always_comb begin
    dl   = (stable_high > us_t'(HIGH_BIAS_US)) ? stable_high - us_t'(HIGH_BIAS_US) : '0;
    cand = MODE_NONE;
    if      (near(dl, dl_us(MODE_30_12), MODE_TOL_US)) cand = MODE_30_12;
    else if (near(dl, dl_us(MODE_27_15), MODE_TOL_US)) cand = MODE_27_15;
    else if (near(dl, dl_us(MODE_24_18), MODE_TOL_US)) cand = MODE_24_18;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode        <= MODE_NONE;
      mode_valid  <= 1'b0;
      pending     <= MODE_NONE;
      cnt         <= '0;
      mode_change <= 1'b0;
      abnormal    <= 1'b0;
    end else begin
      mode_change <= 1'b0;
      abnormal    <= 1'b0;
      if (clear) begin
        mode       <= MODE_NONE;
        mode_valid <= 1'b0;
        pending    <= MODE_NONE;
        cnt        <= '0;
      end else if (frame_ok) begin
        if (cand == MODE_NONE) begin
          abnormal <= 1'b1;
        end else if (!mode_valid) begin
          mode       <= cand;
          mode_valid <= 1'b1;
          pending    <= MODE_NONE;
          cnt        <= '0;
        end else if (cand == mode) begin
          pending <= MODE_NONE;
          cnt     <= '0;
        end else if (cand != pending) begin
          pending <= cand;
          cnt     <= CW'(1);
          if (CONFIRM_N <= 1) begin
            mode        <= cand;
            mode_change <= 1'b1;
            pending     <= MODE_NONE;
            cnt         <= '0;
          end
        end else if ((CW+1)'(cnt) + 1'b1 >= (CW+1)'(CONFIRM_N)) begin
          mode        <= cand;
          mode_change <= 1'b1;
          pending     <= MODE_NONE;
          cnt         <= '0;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
