// tb_tdd_sync_modes: the WiBro operating cases at full size, with every
// parameter of the synchronizer at its default (10 clocks per us).
//
// A noisy base-station envelope (fading drop-outs in DL, noise spikes in
// UL, 1 us jitter of the frame start) runs first in 30:12, then switches to
// 27:15 and to 24:18, and is finally switched off. The testbench checks:
//   - every output DL window, once locked, starts RTG/2 = 39 us before an
//     input DL start within the +/-5 us stability required of a repeater
//     and lasts the output window of the mode in force (3539, 3193 or
//     2848 us, +/-5 us);
//   - each of the three windows is produced at least 10 times;
//   - the first lock comes within 2 s;
//   - each mode change takes effect between 1 and 2 s after the symbol
//     split changed, the delay a repeater is expected to show;
//   - after the signal disappears, TDD generation stops after about 5 s
//     (4.9 to 5.2 s) and tdd_out rests in DL with the DL amplifier off.
// About 7.5 s of signal are simulated.
module tb_tdd_sync_modes;
  import tdd_pkg::*;
  localparam int US = 100;   // time units per us at 10 clocks per us

  logic  clk = 0, rst_n = 0, tdd_in = 0, sck = 0, sen = 0, sda_i = 0;
  logic  sda_o, sda_oe, tdd_out, dl_pa_en, locked, mode_valid;
  mode_e mode;
  int checks = 0, failures = 0;

  tdd_sync_top dut (.*);

  always #5 clk = ~clk;

  task automatic expect_true(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- envelope source ----------------------------------------------------
  mode_e src_mode = MODE_30_12;
  bit    src_on = 1;
  int    last_start_us = -100000, prev_start_us = -100000;
  int    frames = 0, now_us = 0;

  initial begin
    #3;
    forever begin
      automatic int dl = int'(dl_us(src_mode));
      automatic int jit = $urandom_range(0, 2) - 1;
      prev_start_us = last_start_us;
      last_start_us = now_us + jit;
      frames++;
      for (int t = 0; t < PERIOD_US; t++) begin
        if (!src_on)
          tdd_in = 1'b0;
        else if (t < dl + jit && t >= jit)
          tdd_in = !(t > 115 && ($urandom_range(0, 99) < 5));
        else
          tdd_in = ($urandom_range(0, 99) < 4);
        #(US);
        now_us++;
      end
    end
  end

  // ---- output window checker ----------------------------------------------
  int   out_rise = -1, lead = 0;
  int   nwin[3] = '{0, 0, 0};
  int   bad_win = 0, err_min = 1000, err_max = -1000;
  mode_e mode_at_rise = MODE_NONE;
  logic tdd_q = 1;

  always @(posedge clk) begin
    automatic int cur = int'($time / 64'(US));
    tdd_q <= tdd_out;
    if (rst_n && locked && dl_pa_en) begin
      if (tdd_out && !tdd_q) begin
        out_rise = cur;
        mode_at_rise = mode;
        lead = -1;
      end
      // the input DL start this window leads
      if (out_rise >= 0 && lead < 0 && last_start_us > out_rise)
        lead = last_start_us - out_rise;
      if (!tdd_out && tdd_q && out_rise >= 0) begin
        automatic int len = cur - out_rise;
        automatic int k = -1;
        for (int m = 0; m < 3; m++)
          if (len >= int'(total_us(mode_e'(m))) - 5 && len <= int'(total_us(mode_e'(m))) + 5 &&
              (m == int'(mode_at_rise) || m == int'(mode)))
            k = m;
        checks++;
        if (k < 0 || lead < int'(RTG_HALF_US) - 5 || lead > int'(RTG_HALF_US) + 5) begin
          failures++;
          bad_win++;
          if (bad_win < 10)
            $display("bad window at %0d us: lead %0d len %0d mode %0d", out_rise, lead, len,
                     int'(mode));
        end else begin
          nwin[k]++;
          if (int'(RTG_HALF_US) - lead < err_min) err_min = int'(RTG_HALF_US) - lead;
          if (int'(RTG_HALF_US) - lead > err_max) err_max = int'(RTG_HALF_US) - lead;
        end
        out_rise = -1;
      end
    end else begin
      out_rise = -1;
    end
  end

  // ---- watchdog -----------------------------------------------------------
  initial begin
    #(US * PERIOD_US * 1800);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- scenario -----------------------------------------------------------
  task automatic switch_mode(mode_e m);
    int t0, f0;
    // change at a frame boundary
    f0 = frames;
    while (frames == f0) @(negedge clk);
    src_mode = m;
    t0 = now_us;
    while (mode != m && now_us - t0 < 3_000_000) @(negedge clk);
    $display("mode %0d taken after %0d ms", int'(m), (now_us - t0) / 1000);
    expect_true(mode == m && mode_valid && locked, "new mode taken, still locked");
    expect_true(now_us - t0 >= 1_000_000 && now_us - t0 <= 2_000_000,
                "mode change after 1 to 2 s");
  endtask

  initial begin
    int t0, t_off;
    repeat (5) @(posedge clk);
    rst_n = 1;

    // first acquisition in 30:12
    while (!locked && now_us < 2_000_000) @(negedge clk);
    $display("first lock after %0d ms", now_us / 1000);
    expect_true(locked && mode == MODE_30_12, "first lock within 2 s in 30:12");
    t0 = now_us;
    while (now_us - t0 < 100_000) @(negedge clk);

    switch_mode(MODE_27_15);
    t0 = now_us;
    while (now_us - t0 < 100_000) @(negedge clk);
    switch_mode(MODE_24_18);
    t0 = now_us;
    while (now_us - t0 < 100_000) @(negedge clk);

    // signal lost
    src_on = 0;
    t_off = now_us;
    while (dl_pa_en && now_us - t_off < 6_000_000) @(negedge clk);
    $display("TDD generation stopped %0d ms after the signal went", (now_us - t_off) / 1000);
    expect_true(!dl_pa_en && !locked, "generation stopped after the loss");
    expect_true(now_us - t_off >= 4_900_000 && now_us - t_off <= 5_200_000,
                "loss declared after about 5 s");
    repeat (100) @(negedge clk);
    expect_true(tdd_out == 1'b1 && !dl_pa_en, "rests in DL with the DL amplifier off");

    $display("windows 30:12 %0d, 27:15 %0d, 24:18 %0d", nwin[0], nwin[1], nwin[2]);
    $display("DL start error of the output %0d..%0d us", err_min, err_max);
    expect_true(nwin[0] >= 10, "30:12 windows seen");
    expect_true(nwin[1] >= 10, "27:15 windows seen");
    expect_true(nwin[2] >= 10, "24:18 windows seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
