// tb_mode_selector: checks the classification of stable DL durations
// into the three modes, rejection of abnormal durations, the confirmation
// of a mode change after CONFIRM_N frames, a change that is interrupted,
// and clear.
module tb_mode_selector;
  import tdd_pkg::*;
  localparam int BIAS = 34, CONF = 5;
  logic  clk = 0, rst_n = 0, clear = 0, frame_ok = 0;
  us_t   stable_high = 0;
  mode_e mode;
  logic  mode_valid, mode_change, abnormal;
  int checks = 0, failures = 0, changes = 0, abn = 0;

  mode_selector #(.MODE_TOL_US(100), .HIGH_BIAS_US(BIAS), .CONFIRM_N(CONF)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    if (mode_change) changes++;
    if (abnormal) abn++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic frame(int dl);
    @(negedge clk);
    stable_high = us_t'(dl + BIAS); frame_ok = 1;
    @(negedge clk);
    frame_ok = 0;
    @(negedge clk);
  endtask

  task automatic expect_mode(bit v, mode_e m, string what);
    checks++;
    if (mode_valid !== v || (v && mode !== m)) begin
      failures++;
      $display("%s: valid %b mode %0d exp %b %0d", what, mode_valid, mode, v, m);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    expect_mode(0, MODE_NONE, "reset");
    frame(1500);                       // abnormal symbol rate
    expect_mode(0, MODE_NONE, "abnormal");
    frame(3110 + 20);
    expect_mode(1, MODE_27_15, "first 27");
    // change to 30:12 needs CONF frames in a row
    for (int i = 0; i < CONF - 1; i++) begin
      frame(3456 - 10);
      expect_mode(1, MODE_27_15, "pending 30");
    end
    frame(3456);
    expect_mode(1, MODE_30_12, "changed 30");
    // interrupted change: back to the current mode restarts the count
    for (int i = 0; i < CONF - 1; i++) frame(2765);
    frame(3456);
    for (int i = 0; i < CONF - 1; i++) frame(2765);
    expect_mode(1, MODE_30_12, "interrupted");
    frame(2765 + 50);
    expect_mode(1, MODE_24_18, "changed 24");
    // abnormal frames neither change the mode nor break a pending count
    frame(4200);
    expect_mode(1, MODE_24_18, "abnormal kept");
    checks++;
    if (changes != 2 || abn != 2) begin failures++; $display("changes %0d abnormal %0d", changes, abn); end
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    expect_mode(0, MODE_NONE, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
