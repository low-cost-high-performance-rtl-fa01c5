// tb_level_comparator: feeds measurement sequences and checks when the
// signal becomes stable: after STABLE_N agreeing, plausible frames; not on
// frames that differ by more than the tolerance or whose period is not
// 5 ms; and a clear drops the state.
module tb_level_comparator;
  import tdd_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0, clear = 0, meas_valid = 0;
  us_t  high_us = 0, period_us = 0;
  logic frame_ok, stable;
  us_t  stable_high, stable_period;
  int checks = 0, failures = 0;

  level_comparator #(.TOL_US(5), .PERIOD_TOL_US(10), .STABLE_N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // send one measurement, return whether frame_ok came
  task automatic meas(int h, int p, output bit ok);
    @(negedge clk);
    high_us = us_t'(h); period_us = us_t'(p); meas_valid = 1;
    @(negedge clk);
    meas_valid = 0;
    ok = frame_ok;
  endtask

  task automatic expect_ok(int h, int p, bit exp, string what);
    bit ok;
    meas(h, p, ok);
    checks++;
    if (ok !== exp || stable !== exp) begin
      failures++;
      $display("%s: frame_ok %b stable %b exp %b", what, ok, stable, exp);
    end
    if (exp && (int'(stable_high) != h || int'(stable_period) != p)) begin
      failures++;
      $display("%s: stable values %0d %0d", what, stable_high, stable_period);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // first measurement has nothing to compare with; then N agreeing ones
    expect_ok(3110, 5000, 0, "first");
    for (int i = 1; i < N; i++) expect_ok(3110 + (i % 3), 5000 - (i % 2), 0, "building");
    expect_ok(3112, 5001, 1, "stable");
    expect_ok(3108, 4998, 1, "stays");
    // a jump beyond the tolerance breaks stability
    expect_ok(3120, 5000, 0, "jump");
    for (int i = 0; i < N - 1; i++) expect_ok(3120, 5000, 0, "rebuild");
    expect_ok(3120, 5000, 1, "stable again");
    // wrong period: consistent but not a WiBro frame
    for (int i = 0; i < N + 3; i++) expect_ok(2000, 4000, 0, "bad period");
    for (int i = 0; i < N; i++) expect_ok(3456, 5000, 0, "good again");
    expect_ok(3456, 5000, 1, "good stable");
    // clear
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    checks++;
    if (stable) begin failures++; $display("clear"); end
    expect_ok(3456, 5000, 0, "after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
