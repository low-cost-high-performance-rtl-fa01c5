// tb_sync_regenerator: 100-tick period, tick every clock. Checks that the
// first detected sync starts the output; that the output keeps its period
// while detected syncs are missing; that small early and late offsets pull
// it; that a new phase is only taken after REALIGN_N syncs in a row; and
// that valid drops after HOLD_FRAMES frames without a detected sync.
module tb_sync_regenerator;
  import tdd_pkg::*;
  localparam int P = 100, TOL = 8, RN = 3, HOLD = 5;
  logic clk = 0, rst_n = 0, tick = 1, clear = 0, sync_in = 0;
  logic sync_out, valid, realign;
  int checks = 0, failures = 0, cyc = 0;
  int outs[$];
  int n_realign = 0;

  sync_regenerator #(.PERIOD(P), .TOL_US(TOL), .REALIGN_N(RN), .HOLD_FRAMES(HOLD)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (rst_n && sync_out) outs.push_back(cyc);
    if (rst_n && realign) n_realign++;
    cyc <= cyc + 1;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pulse sync_in so that the DUT sees it at clock c
  task automatic pulse_at(int c);
    while (cyc < c - 1) @(negedge clk);
    sync_in = 1;
    @(negedge clk);
    sync_in = 0;
  endtask

  task automatic expect_out(int c, string what);
    checks++;
    if (outs.size() == 0 || outs[0] != c) begin
      failures++;
      $display("%s: out at %0d exp %0d", what, (outs.size() ? outs[0] : -1), c);
    end
    if (outs.size()) void'(outs.pop_front());
  endtask

  task automatic wait_to(int c);
    while (cyc < c) @(negedge clk);
  endtask

  initial begin
    // with a tick on every clock a sync at clock c gives an output at c
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    pulse_at(20);
    wait_to(30);  expect_out(20, "start");
    wait_to(130); expect_out(120, "free run");
    pulse_at(220);                       // on time
    wait_to(230); expect_out(220, "on time");
    pulse_at(317);                       // 3 early: pulls the frame
    wait_to(330); expect_out(317, "early");
    pulse_at(422);                       // 5 late: frame already out at 417
    wait_to(430); expect_out(417, "late");
    wait_to(530); expect_out(522, "after late");
    // new phase +50: taken only on the RN-th one
    pulse_at(570); wait_to(630); expect_out(622, "new 1");
    pulse_at(670); wait_to(730); expect_out(722, "new 2");
    pulse_at(770); wait_to(780); expect_out(770, "realigned");
    checks++;
    if (n_realign != 1) begin failures++; $display("realign %0d", n_realign); end
    // hold-over: HOLD frames without input, then valid drops
    wait_to(770 + HOLD * P + 10);
    checks++;
    if (valid) begin failures++; $display("valid after hold"); end
    checks++;
    if (outs.size() != HOLD) begin failures++; $display("hold outs %0d", outs.size()); end
    outs.delete();
    // restarts on the next detected sync
    pulse_at(1400); wait_to(1410); expect_out(1400, "restart");
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    checks++;
    if (valid) begin failures++; $display("clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
