// tb_tdd_signal_generator: tick every clock, a delayed sync every 5000
// ticks. For each mode and several trims it measures where the DL window
// starts after the sync and how long it is, against BASE_US + rise_off and
// total + fall_off - rise_off. It also checks the resting state while
// disabled (DL, PA off) and that a mode change waits for the next frame.
module tb_tdd_signal_generator;
  import tdd_pkg::*;
  localparam int BASE = 16;
  logic  clk = 0, rst_n = 0, tick = 1, en = 0, dsync = 0;
  mode_e mode = MODE_27_15;
  trim_t rise_off = 0, fall_off = 0;
  logic  tdd_out, pa_en;
  int checks = 0, failures = 0;

  tdd_signal_generator #(.BASE_US(BASE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one frame: sync, then measure start and length of the DL window
  task automatic frame(mode_e exp_m, int ro, int fo, mode_e next_mode, bit change_mid);
    int t = 0, start = -1, len = 0;
    @(negedge clk); dsync = 1; @(negedge clk); dsync = 0;
    // phase 0 is the clock dsync is taken; tdd_out shows phase p one clock later
    for (t = 1; t < PERIOD_US; t++) begin
      if (change_mid && t == 100) mode = next_mode;
      if (tdd_out) begin
        if (start < 0) start = t;
        len++;
      end
      if (t < PERIOD_US - 1) @(negedge clk);
    end
    checks++;
    if (start != BASE + ro + 2 || len != int'(total_us(exp_m)) + fo - ro) begin
      failures++;
      $display("mode %0d trims %0d %0d: start %0d len %0d", exp_m, ro, fo, start, len);
    end
    checks++;
    if (!pa_en) begin failures++; $display("pa_en low"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (20) @(negedge clk);
    checks++;
    if (tdd_out !== 1'b1 || pa_en !== 1'b0) begin failures++; $display("disabled state"); end
    en = 1;
    @(negedge clk); dsync = 1; @(negedge clk); dsync = 0;   // first frame
    repeat (PERIOD_US - 2) @(negedge clk);
    mode = MODE_30_12;
    frame(MODE_30_12, 0, 0, MODE_30_12, 0);
    mode = MODE_27_15;
    frame(MODE_27_15, 0, 0, MODE_27_15, 0);
    mode = MODE_24_18;
    frame(MODE_24_18, 0, 0, MODE_30_12, 1);  // change mid-frame: this frame stays 24
    frame(MODE_30_12, 0, 0, MODE_30_12, 0);
    rise_off = -3; fall_off = 5;
    repeat (2) @(negedge clk);
    frame(MODE_30_12, -3, 5, MODE_30_12, 0);
    rise_off = 7; fall_off = -15;
    repeat (2) @(negedge clk);
    frame(MODE_30_12, 7, -15, MODE_30_12, 0);
    en = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (tdd_out !== 1'b1 || pa_en !== 1'b0) begin failures++; $display("disabled again"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
