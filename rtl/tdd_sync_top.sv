// tdd_sync_top: digital part of a TDD synchronizer for a WiBro RF repeater.
//
// A WiBro repeater must switch between its downlink and uplink paths in
// step with the base station, but has no modem to tell it the frame
// timing. The analog front end turns the received downlink into a TTL
// envelope (1 while the base station transmits); this block recovers the
// 5 ms frame timing and the DL:UL split from that envelope alone and
// drives the repeater's TDD switch.
//
//   tdd_in -> input_interface -> low_level_filter -> high_level_filter
//          -> duration_calculator -> level_comparator -> mode_selector
//          -> sync_generator (4 us mask) -> sync_regenerator
//          -> delay_controller (equation (1)) -> tdd_signal_generator -> tdd_out
//   sck/sda/sen -> serial_interface -> offset_generator, latencies, status
//   main_controller and resync_controller supervise lock, loss and resync.
//
// Timing is counted in 1 us ticks of a TICK_DIV divider (10 MHz clock by
// default). tdd_out = 1 selects DL. At lock it enters DL RTG/2 = 39 us
// before the repeated DL starts and leaves it TTG/2 = 44 us after DL ends,
// one frame later than the frame it was measured on; dl_pa_en is low until
// the output switches. The latency defaults T_DIG_DEF and T_GEN_DEF are the
// digital latency of this implementation in ticks; t_d,RF defaults to 0 and
// is set over the serial port for the RF circuit in use. The block split
// follows the document's block diagram; the input filters' order follows
// its text (low-level, then high-level).
// The event pulses mode_change, abnormal, sg_forced, sg_ignored and
// rg_realign, and the input edge pulses, are left unconnected here; they
// are observation points for test and for a status extension.
module tdd_sync_top
  import tdd_pkg::*;
#(
  parameter int unsigned TICK_DIV    = 10,
  parameter int unsigned TAPS        = 64,
  parameter int unsigned LOW_TH      = 40,
  parameter int unsigned HIGH_TH     = 8,
  parameter int unsigned MASK_US     = 4,
  parameter int unsigned STABLE_N    = 4,
  parameter int unsigned CONFIRM_N   = 200,
  parameter int unsigned MISS_N      = 8,
  parameter int unsigned REALIGN_N   = 4,
  parameter int unsigned HOLD_FRAMES = 1000,
  parameter int unsigned LOSS_US     = 5_000_000,
  parameter int unsigned BASE_US     = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  tdd_in,      // TTL envelope from the analog front end
  input  logic  sck,
  input  logic  sen,
  input  logic  sda_i,
  output logic  sda_o,
  output logic  sda_oe,
  output logic  tdd_out,     // 1 = DL, 0 = UL
  output logic  dl_pa_en,    // DL power amplifier may run
  output logic  locked,
  output mode_e mode,
  output logic  mode_valid
);
  // Filter rise delay plus the registers between the pin and the sync.
  localparam int unsigned T_DIG_DEF = LOW_TH + HIGH_TH + 4;
  // Ticks the regenerator, delay controller and generator add, plus BASE_US.
  localparam int unsigned T_GEN_DEF = BASE_US + 2;
  // DL-duration widening of the two filters (later fall than rise).
  localparam int unsigned WIDEN_US  = 2 * TAPS + 2 - 2 * (LOW_TH + HIGH_TH);

  logic tick;
  logic s_in, s_low, s_filt;
  logic meas_valid;
  us_t  high_us, period_us;
  logic frame_ok, stable;
  us_t  stable_high, stable_period;
  logic mode_change, abnormal;
  logic sg_sync, sg_tracking, sg_forced, sg_ignored, sg_lost;
  logic rg_sync, rg_valid, rg_realign;
  us_t  t_delay;
  logic dsync;
  trim_t rise_off, fall_off;
  logic arm, gen_en, loss;
  logic sg_clear, full_clear;
  logic [7:0] resyncs;
  cfg_t    cfg;
  status_t status;

  us_tick #(.TICK_DIV(TICK_DIV)) u_tick (.clk, .rst_n, .tick);

  input_interface u_in (
    .clk, .rst_n, .tick, .tdd_in,
    .sig_out(s_in), .rise(), .fall()
  );

  low_level_filter #(.TAPS(TAPS), .THRESH(LOW_TH)) u_low (
    .clk, .rst_n, .tick, .din(s_in), .dout(s_low)
  );

  high_level_filter #(.TAPS(TAPS), .THRESH(HIGH_TH)) u_high (
    .clk, .rst_n, .tick, .din(s_low), .dout(s_filt)
  );

  duration_calculator u_dur (
    .clk, .rst_n, .tick, .sig(s_filt),
    .meas_valid, .high_us, .period_us
  );

  level_comparator #(.STABLE_N(STABLE_N)) u_cmp (
    .clk, .rst_n, .clear(full_clear),
    .meas_valid, .high_us, .period_us,
    .frame_ok, .stable, .stable_high, .stable_period
  );

  mode_selector #(.HIGH_BIAS_US(WIDEN_US), .CONFIRM_N(CONFIRM_N)) u_mode (
    .clk, .rst_n, .clear(full_clear),
    .frame_ok, .stable_high,
    .mode, .mode_valid, .mode_change, .abnormal
  );

  sync_generator #(.MASK_US(MASK_US), .MISS_N(MISS_N)) u_sg (
    .clk, .rst_n, .tick, .clear(full_clear | sg_clear), .arm, .sig(s_filt),
    .sync(sg_sync), .tracking(sg_tracking), .forced(sg_forced),
    .ignored(sg_ignored), .lost(sg_lost)
  );

  sync_regenerator #(.REALIGN_N(REALIGN_N), .HOLD_FRAMES(HOLD_FRAMES)) u_rg (
    .clk, .rst_n, .tick, .clear(full_clear), .sync_in(sg_sync),
    .sync_out(rg_sync), .valid(rg_valid), .realign(rg_realign)
  );

  delay_controller u_dly (
    .clk, .rst_n, .tick, .sync_in(rg_sync),
    .t_dig(cfg.t_dig), .t_rf(cfg.t_rf), .t_gen(cfg.t_gen),
    .t_delay, .dsync
  );

  serial_interface #(.T_DIG_DEF(T_DIG_DEF), .T_GEN_DEF(T_GEN_DEF)) u_ser (
    .clk, .rst_n, .sck, .sen, .sda_i, .sda_o, .sda_oe, .status, .cfg
  );

  offset_generator #(.TRIM_MAX(BASE_US - 1)) u_off (
    .clk, .rst_n,
    .trim_all(cfg.trim_all), .trim_rise(cfg.trim_rise), .trim_fall(cfg.trim_fall),
    .rise_off, .fall_off
  );

  tdd_signal_generator #(.BASE_US(BASE_US)) u_gen (
    .clk, .rst_n, .tick, .en(gen_en), .dsync, .mode,
    .rise_off, .fall_off, .tdd_out, .pa_en(dl_pa_en)
  );

  main_controller #(.LOSS_US(LOSS_US)) u_main (
    .clk, .rst_n, .tick, .enable(cfg.enable),
    .frame_ok, .stable, .mode_valid, .regen_valid(rg_valid),
    .arm, .gen_en, .locked, .loss
  );

  resync_controller u_resync (
    .clk, .rst_n, .loss, .sg_lost, .sg_tracking, .stable,
    .sg_clear, .full_clear, .resyncs
  );

  always_comb begin
    status.locked      = locked;
    status.mode_valid  = mode_valid;
    status.mode        = mode;
    status.meas_high   = stable_high;
    status.meas_period = stable_period;
    status.t_delay     = t_delay;
    status.resyncs     = resyncs;
  end
endmodule
