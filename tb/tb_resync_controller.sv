// tb_resync_controller: a loss must give one full clear; a lost sync
// while frames are stable gives one sync clear and no second one until the
// sync generator tracks again; a lost sync without stable frames gives
// none.
module tb_resync_controller;
  logic clk = 0, rst_n = 0, loss = 0, sg_lost = 0, sg_tracking = 1, stable = 0;
  logic sg_clear, full_clear;
  logic [7:0] resyncs;
  int checks = 0, failures = 0, n_sg = 0, n_full = 0;

  resync_controller dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    if (sg_clear) begin n_sg++; sg_tracking <= 0; end
    if (full_clear) n_full++;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_n(int s, int f, string what);
    checks++;
    if (n_sg != s || n_full != f || int'(resyncs) != s) begin
      failures++;
      $display("%s: sg %0d full %0d resyncs %0d", what, n_sg, n_full, resyncs);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); sg_lost = 1; repeat (10) @(negedge clk);
    expect_n(0, 0, "lost, not stable");
    stable = 1; repeat (10) @(negedge clk);
    expect_n(1, 0, "desync");
    repeat (20) @(negedge clk);
    expect_n(1, 0, "waits for tracking");
    sg_tracking = 1; sg_lost = 0; repeat (5) @(negedge clk);
    sg_lost = 1; repeat (5) @(negedge clk);
    expect_n(2, 0, "second desync");
    sg_lost = 0;
    @(negedge clk); loss = 1; @(negedge clk); loss = 0; repeat (3) @(negedge clk);
    expect_n(2, 1, "loss");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
