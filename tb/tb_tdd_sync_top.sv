// tb_tdd_sync_top: end-to-end run of the synchronizer on a synthetic
// downlink envelope, at reduced time constants (2 clocks per us, 3 frames
// to confirm a mode change, 8 frames to declare loss).
//
// The envelope generator models a base station with 5 ms frames: logic 1
// for the DL duration of the current mode, with fading drop-outs inside
// DL and noise spikes in the UL region, and optional jitter or a late
// start of the DL edge. The run goes through: acquisition in 27:15; a
// serial trim of the output edges; a mode change to 30:12; frames with a
// late DL start (mask forcing and ignoring); a run of frames with an
// abnormal DL length (rejected); a jump of the frame timing (desync,
// resync, realignment); loss of the signal (output stops); and
// re-acquisition in 24:18. Whenever the output is locked and the input is
// undisturbed, each DL window of tdd_out is checked against the input: it
// must start RTG/2 = 39 us before an input DL start and last
// DL + TTG/2 + RTG/2 us, within 1 us on a clean envelope and within the
// +/-5 us switching stability of the repeater specification with fading. Every mechanism is counted and must
// have happened at least once.
module tb_tdd_sync_top;
  import tdd_pkg::*;
  localparam int TICK_DIV = 2;
  localparam int US = 10 * TICK_DIV;        // time units per microsecond

  logic  clk = 0, rst_n = 0, tdd_in = 0, sck = 0, sen = 0, sda_i = 0;
  logic  sda_o, sda_oe, tdd_out, dl_pa_en, locked, mode_valid;
  mode_e mode;
  int checks = 0, failures = 0;

  tdd_sync_top #(
    .TICK_DIV(TICK_DIV), .CONFIRM_N(3), .MISS_N(8), .REALIGN_N(3),
    .HOLD_FRAMES(20), .LOSS_US(100_000)
  ) dut (.*);

  always #5 clk = ~clk;

  // ---------------- envelope generator ----------------
  mode_e src_mode = MODE_27_15;
  bit    src_on = 1;
  int    src_dl_override = 0;     // nonzero: abnormal DL length
  int    src_late = 0;            // DL start this many us late (edge lost)
  int    src_jitter = 0;          // +/- jitter of the DL start
  int    src_shift = 0;           // one-off shift of the frame timing
  bit    src_noisy = 0;           // fading drop-outs and UL noise
  int    tole = 1;                // allowed output edge error, us
  int    frame_start_us[$];       // ideal DL start of each frame, us
  int    frame_total[$];          // expected DL window of the output
  bit    frame_clean[$];
  int    now_us = 0;
  int    frames = 0;
  int    since_mode = 100;
  mode_e last_mode = MODE_27_15;
  int    err_min = 99, err_max = -99;

  initial begin
    #3;
    forever begin
      int dl, start, late, jit;
      bit clean;
      if (src_shift != 0) begin
        repeat (src_shift) begin tdd_in = 0; #(US); now_us++; end
        src_shift = 0;
      end
      dl    = src_dl_override ? src_dl_override : int'(dl_us(src_mode));
      late  = src_late;
      jit   = src_jitter ? $urandom_range(0, 2 * src_jitter) - src_jitter : 0;
      if (src_mode != last_mode) since_mode = 0;
      last_mode = src_mode;
      // the output follows a new mode only once it is confirmed
      clean = src_on && !src_dl_override && !late && since_mode > 12;
      since_mode++;
      start = now_us;
      frame_start_us.push_back(start);
      frame_total.push_back(int'(total_us(src_mode)));
      frame_clean.push_back(clean);
      frames++;
      for (int t = 0; t < PERIOD_US; t++) begin
        bit v;
        if (!src_on) v = 0;
        else if (t < dl + jit && t >= late + jit) begin
          // fading drop-outs inside DL, not in the power-boosted preamble
          v = !(src_noisy && t > 115 && ($urandom_range(0, 99) < 5));
        end else begin
          // noise spikes in the UL region
          v = src_noisy && ($urandom_range(0, 99) < 4);
        end
        tdd_in = v;
        #(US);
        now_us++;
      end
    end
  end

  // ---------------- output checker ----------------
  int out_rise_us = -1;
  int n_win_checked = 0, n_win_bad = 0;
  logic tdd_q = 1;
  int  cur_us;
  always @(posedge clk) begin
    cur_us = int'($time / US);
    tdd_q <= tdd_out;
    if (rst_n && locked && dl_pa_en) begin
      if (tdd_out && !tdd_q) out_rise_us = cur_us;
      if (!tdd_out && tdd_q && out_rise_us >= 0) check_window(out_rise_us, cur_us);
    end
  end

  int trim_rise_exp = 0, trim_fall_exp = 0;
  bit checking = 1;
  task automatic check_window(int r, int f);
    // the input frame whose DL starts about 39 us after r
    foreach (frame_start_us[i]) begin
      int d = frame_start_us[i] - r;
      if (d > 0 && d < 200) begin
        // this frame and the one measured a period earlier must be clean
        if (checking && frame_clean[i] && i > 0 && frame_clean[i-1]) begin
          int e_r = frame_start_us[i] - int'(RTG_HALF_US) + trim_rise_exp;
          int e_len = frame_total[i-1] + trim_fall_exp - trim_rise_exp;
          checks++;
          n_win_checked++;
          if (r - e_r < err_min) err_min = r - e_r;
          if (r - e_r > err_max) err_max = r - e_r;
          if (r < e_r - tole || r > e_r + tole || (f - r) < e_len - tole || (f - r) > e_len + tole) begin
            failures++;
            n_win_bad++;
            if (n_win_bad < 6) $display("window at %0d: start %0d len %0d exp %0d", r, r - e_r, f - r, e_len);
          end
        end
        return;
      end
    end
  endtask

  // ---------------- mechanism counters ----------------
  int n_spike_removed = 0, n_gap_filled = 0, n_forced = 0, n_ignored = 0;
  int n_mode_change = 0, n_abnormal = 0, n_resync = 0, n_realign = 0, n_loss = 0;
  int n_lock = 0;
  logic locked_q = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.tick && dut.s_in && !dut.s_low && !dut.u_high.dout && !dut.u_low.taps[20]) n_spike_removed++;
    if (dut.tick && !dut.s_low && dut.s_filt && dut.u_low.taps[0] == 0 && dut.u_high.ones > 40) n_gap_filled++;
    if (dut.sg_forced)   n_forced++;
    if (dut.sg_ignored)  n_ignored++;
    if (dut.mode_change) n_mode_change++;
    if (dut.abnormal)    n_abnormal++;
    if (dut.sg_clear)    n_resync++;
    if (dut.rg_realign)  n_realign++;
    if (dut.loss)        n_loss++;
    locked_q <= locked;
    if (locked && !locked_q) n_lock++;
  end

  // ---------------- serial master ----------------
  localparam int HALF = 8;
  task automatic xfer(bit rd, logic [6:0] a, logic [15:0] wd, output logic [15:0] q);
    logic [23:0] fr = {rd, a, wd};
    q = '0;
    @(negedge clk); sen = 1;
    repeat (HALF) @(negedge clk);
    for (int i = 23; i >= 0; i--) begin
      sda_i = fr[i];
      repeat (HALF) @(negedge clk);
      sck = 1;
      if (i < 16) q = {q[14:0], (sda_oe ? sda_o : 1'b0)};
      repeat (HALF) @(negedge clk);
      sck = 0;
    end
    repeat (HALF) @(negedge clk);
    sen = 0;
  endtask

  task automatic wait_frames(int n);
    int f0 = frames;
    while (frames < f0 + n) @(negedge clk);
  endtask

  task automatic expect_true(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #(US * PERIOD_US * 200);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] q;
    int t0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    // 1. acquisition in 27:15 on a clean envelope: edges within 1 us
    wait_frames(12);
    expect_true(locked && mode_valid && mode == MODE_27_15, "lock in 27:15");
    expect_true(dl_pa_en, "PA enabled");
    xfer(1, REG_STATUS, 16'h0, q);
    expect_true(q == {12'b0, 1'b1, 1'b1, MODE_27_15}, "status register");
    // 2. serial trim of both edges by +3 us, then back
    wait_frames(2);
    $display("clean envelope: DL start error %0d .. %0d us", err_min, err_max);
    checking = 0;
    xfer(0, REG_TRIM_ALL, 16'd3, q);
    wait_frames(2);
    trim_rise_exp = 3; trim_fall_exp = 3;
    checking = 1;
    wait_frames(3);
    checking = 0;
    xfer(0, REG_TRIM_ALL, 16'd0, q);
    wait_frames(1);
    trim_rise_exp = 0; trim_fall_exp = 0;
    // from here on: fading, UL noise and 1 us jitter; edges within the
    // +/-5 us switching stability of the WiBro repeater specification
    src_noisy = 1; src_jitter = 1; tole = 5;
    err_min = 99; err_max = -99;
    wait_frames(1);
    checking = 1;
    // 3. mode change to 30:12
    src_mode = MODE_30_12;
    wait_frames(12);
    expect_true(mode == MODE_30_12 && locked, "mode 30:12");
    // 4. late DL starts: the mask forces the sync and ignores the late edge
    src_late = 12;
    wait_frames(2);
    src_late = 0;
    wait_frames(3);
    expect_true(locked, "still locked after late edges");
    // 5. abnormal DL length, consistent over many frames: rejected
    src_dl_override = 1800;
    wait_frames(8);
    expect_true(mode == MODE_30_12 && locked, "abnormal rate ignored");
    src_dl_override = 0;
    wait_frames(6);
    // 6. frame timing jumps by 1000 us: desync, resync, realign
    checking = 0;
    src_shift = 1000;
    wait_frames(20);
    checking = 1;
    expect_true(locked && mode == MODE_30_12, "locked after timing jump");
    wait_frames(4);
    // 7. signal lost: output stops after the loss time
    src_on = 0;
    wait_frames(25);
    expect_true(!locked && !dl_pa_en && tdd_out, "output stopped after loss");
    // 8. signal back in 24:18
    src_mode = MODE_24_18;
    src_on = 1;
    wait_frames(14);
    expect_true(locked && mode == MODE_24_18, "re-acquired in 24:18");

    $display("windows checked %0d, bad %0d, DL start error %0d .. %0d us", n_win_checked, n_win_bad, err_min, err_max);
    $display("spikes removed %0d, gaps filled %0d, forced %0d, ignored %0d",
             n_spike_removed, n_gap_filled, n_forced, n_ignored);
    $display("mode changes %0d, abnormal %0d, resyncs %0d, realigns %0d, losses %0d, locks %0d",
             n_mode_change, n_abnormal, n_resync, n_realign, n_loss, n_lock);
    expect_true(n_win_checked >= 20, "enough windows checked");
    expect_true(n_spike_removed > 0, "filter removed UL spikes");
    expect_true(n_gap_filled > 0, "filter filled DL gaps");
    expect_true(n_forced > 0, "mask forced a sync");
    expect_true(n_ignored > 0, "mask ignored an edge");
    expect_true(n_mode_change > 0, "mode change");
    expect_true(n_abnormal > 0, "abnormal rate seen");
    expect_true(n_resync > 0, "resync");
    expect_true(n_realign > 0, "regenerator realigned");
    expect_true(n_loss > 0, "loss");
    expect_true(n_lock >= 2, "locked twice");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
