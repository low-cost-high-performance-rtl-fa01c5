// tb_tdd_sync_full: the synchronizer with every parameter at its default
// (10 clocks per us, 5 ms frames) taken through one complete acquisition.
// A base-station envelope in the 24:18 mode with fading drop-outs, UL
// noise and 1 us jitter is applied from reset; after lock every output DL
// window must start RTG/2 = 39 us before an input DL start, within the
// +/-5 us switching stability of the repeater specification, and last
// 2848 us. The mode register is read back over the serial port.
module tb_tdd_sync_full;
  import tdd_pkg::*;
  localparam int US = 100;   // time units per us at 10 clocks per us

  logic  clk = 0, rst_n = 0, tdd_in = 0, sck = 0, sen = 0, sda_i = 0;
  logic  sda_o, sda_oe, tdd_out, dl_pa_en, locked, mode_valid;
  mode_e mode;
  int checks = 0, failures = 0;

  tdd_sync_top dut (.*);

  always #5 clk = ~clk;

  int frame_start_us[$];
  int frames = 0, now_us = 0;

  initial begin
    #3;
    forever begin
      automatic int dl = int'(dl_us(MODE_24_18));
      automatic int jit = $urandom_range(0, 2) - 1;
      frame_start_us.push_back(now_us);
      frames++;
      for (int t = 0; t < PERIOD_US; t++) begin
        if (t < dl + jit && t >= jit)
          tdd_in = !(t > 115 && ($urandom_range(0, 99) < 5));
        else
          tdd_in = ($urandom_range(0, 99) < 4);
        #(US);
        now_us++;
      end
    end
  end

  int out_rise = -1, nwin = 0, lock_frame = -1;
  logic tdd_q = 1;
  always @(posedge clk) begin
    automatic int cur = int'($time / US);
    tdd_q <= tdd_out;
    if (rst_n && locked && lock_frame < 0) lock_frame = frames;
    if (rst_n && locked && dl_pa_en) begin
      if (tdd_out && !tdd_q) out_rise = cur;
      if (!tdd_out && tdd_q && out_rise >= 0) begin
        foreach (frame_start_us[i]) begin
          automatic int d = frame_start_us[i] - out_rise;
          if (d > 0 && d < 200) begin
            checks++;
            nwin++;
            if (d < int'(RTG_HALF_US) - 5 || d > int'(RTG_HALF_US) + 5 ||
                (cur - out_rise) < int'(total_us(MODE_24_18)) - 5 ||
                (cur - out_rise) > int'(total_us(MODE_24_18)) + 5) begin
              failures++;
              $display("window at %0d: lead %0d len %0d", out_rise, d, cur - out_rise);
            end
          end
        end
      end
    end
  end

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

  initial begin
    #(US * PERIOD_US * 40);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] q;
    repeat (5) @(posedge clk);
    rst_n = 1;
    while (frames < 22) @(negedge clk);
    checks++;
    if (!(locked && mode_valid && mode == MODE_24_18 && dl_pa_en)) begin
      failures++;
      $display("not locked in 24:18");
    end
    checks++;
    if (lock_frame < 0 || lock_frame > 10) begin
      failures++;
      $display("lock after %0d frames", lock_frame);
    end
    xfer(1, REG_STATUS, 16'h0, q);
    checks++;
    if (q != {12'b0, 1'b1, 1'b1, MODE_24_18}) begin failures++; $display("status %h", q); end
    checks++;
    if (nwin < 10) begin failures++; $display("only %0d windows", nwin); end
    $display("locked after %0d frames, %0d windows checked", lock_frame, nwin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
