// tdd_pkg: types and constants shared by the TDD synchronizer.
//
// All timing inside the synchronizer is counted in 1 us ticks. The WiBro
// frame is 5 ms long and carries 42 OFDMA symbols of 115.2 us; the operator
// uses one of three DL:UL splits (30:12, 27:15, 24:18). The DL durations,
// the half guard times (TTG/2 = 44 us, RTG/2 = 39 us) and the length of the
// DL window of the TDD output (DL + TTG/2 + RTG/2) are the WiBro numbers.
// The serial register map is this design's own.
package tdd_pkg;

  // Microsecond counts: 16 bits hold a full 5 ms frame with margin.
  typedef logic [15:0] us_t;
  typedef logic signed [15:0] trim_t;

  // DL:UL symbol split in use.
  typedef enum logic [1:0] {
    MODE_30_12 = 2'd0,
    MODE_27_15 = 2'd1,
    MODE_24_18 = 2'd2,
    MODE_NONE  = 2'd3
  } mode_e;

  localparam int unsigned PERIOD_US   = 5000; // frame period
  localparam int unsigned TTG_HALF_US = 44;   // guard after DL, TDD stays in DL
  localparam int unsigned RTG_HALF_US = 39;   // TDD enters DL this early

  // DL subframe duration for each mode: symbols * 115.2 us, rounded.
  function automatic int unsigned dl_us(mode_e m);
    case (m)
      MODE_30_12: return 3456;
      MODE_27_15: return 3110;
      MODE_24_18: return 2765;
      default:    return 0;
    endcase
  endfunction

  // DL window of the TDD output: DL + TTG/2 + RTG/2 (3539, 3193, 2848 us).
  function automatic int unsigned total_us(mode_e m);
    return (m == MODE_NONE) ? 0 : dl_us(m) + TTG_HALF_US + RTG_HALF_US;
  endfunction

  // Serial register map (7-bit addresses, 16-bit data).
  typedef enum logic [6:0] {
    REG_CTRL       = 7'h00, // bit0: enable TDD generation
    REG_T_DIG      = 7'h01, // t_d,DIG in us
    REG_T_RF       = 7'h02, // t_d,RF in us
    REG_T_GEN      = 7'h03, // t_d,GEN in us
    REG_TRIM_ALL   = 7'h04, // signed trim of both TDD edges, us
    REG_TRIM_RISE  = 7'h05, // signed extra trim of the DL start edge, us
    REG_TRIM_FALL  = 7'h06, // signed extra trim of the DL end edge, us
    REG_STATUS     = 7'h10, // read only: {12'b0, locked, mode_valid, mode}
    REG_MEAS_HIGH  = 7'h11, // read only: last stable DL duration, us
    REG_MEAS_PER   = 7'h12, // read only: last stable period, us
    REG_T_DELAY    = 7'h13, // read only: t_d,TDD in use, us
    REG_RESYNCS    = 7'h14  // read only: re-acquisitions after a desync
  } reg_addr_e;

  // Values programmed by the external processor.
  typedef struct packed {
    logic  enable;
    us_t   t_dig;
    us_t   t_rf;
    us_t   t_gen;
    trim_t trim_all;
    trim_t trim_rise;
    trim_t trim_fall;
  } cfg_t;

  // Values the external processor can read back.
  typedef struct packed {
    logic  locked;
    logic  mode_valid;
    mode_e mode;
    us_t   meas_high;
    us_t   meas_period;
    us_t   t_delay;
    logic [7:0] resyncs;
  } status_t;

endpackage
