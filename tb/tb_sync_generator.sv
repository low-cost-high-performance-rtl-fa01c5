// tb_sync_generator: runs the mask with a 100-tick period (tick every
// clock). Rising edges are placed on time, inside the 4-tick window early
// and late, outside it, and left out. An independent model of the rules
// (first edge while armed; edges in the window pass and pull the
// reference one tick towards them; edges outside are ignored; a missing edge is forced at the window end and the reference
// stays on the expected position) gives the sample at which each sync must come; the test compares
// them one by one and counts the forced and ignored cases and lost.
module tb_sync_generator;
  import tdd_pkg::*;
  localparam int P = 100, MASK = 4, MISS = 3;
  logic clk = 0, rst_n = 0, tick = 1, clear = 0, arm = 0, sig = 0;
  logic sync, tracking, forced, ignored, lost;
  int checks = 0, failures = 0;
  int cyc = 0;
  int rises[$];          // sample index of each rising edge
  int exp_sync[$], got_sync[$];
  int lost_at = -1, got_lost = -1;
  int n_forced = 0, n_ignored = 0, exp_forced = 0, exp_ignored = 0;

  sync_generator #(.PERIOD(P), .MASK_US(MASK), .MISS_N(MISS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sample index cyc is the posedge at which the DUT takes sig
  always @(posedge clk) begin
    if (rst_n) begin
      if (sync) got_sync.push_back(cyc - 1);
      if (forced) n_forced++;
      if (ignored) n_ignored++;
      if (lost && got_lost < 0) got_lost = cyc - 1;
    end
    cyc <= cyc + 1;
  end

  // independent model over the list of edges, armed from sample arm_at
  task automatic build_model(int arm_at, int last);
    int r = -1, k = 0, misses = 0;
    bit found;
    for (int t = arm_at; t <= last; t++) begin
      found = 0;
      foreach (rises[i]) if (rises[i] == t) found = 1;
      if (r < 0) begin
        if (found) begin r = t; exp_sync.push_back(t); end
      end else if (found && t >= r + P - MASK / 2 && t <= r + P + MASK / 2 - 1) begin
        exp_sync.push_back(t); r = r + P + ((t > r + P) ? 1 : (t < r + P) ? -1 : 0); misses = 0;
      end else if (t == r + P + MASK / 2 - 1) begin
        exp_sync.push_back(t); r = r + P; exp_forced++; misses++;
        if (misses == MISS && lost_at < 0) lost_at = t;
      end else if (found) begin
        exp_ignored++;
      end
    end
  endtask

  initial begin
    int t0 = 50, arm_at = 40, last;
    // edges relative to frame k: on time, -2, +1, missing, +3 (outside), ...
    int offs[] = '{0, 0, -2, 1, 0, 999, 0, 3, 0, -5, 0, 0, 999, 999, 999, 999, 0};
    int base = t0;
    foreach (offs[k]) begin
      if (offs[k] != 999) rises.push_back(base + offs[k]);
      base += P;
    end
    rises.push_back(t0 + 3 * P + 40);   // glitch in mid-frame
    rises.sort();
    last = base + P;
    build_model(arm_at, last + 2);   // syncs are collected up to 3 samples after the stimulus

    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // drive sig: high for 30 samples after each rising edge
    while (cyc <= last) begin
      @(negedge clk);
      arm = (cyc >= arm_at);
      sig = 0;
      foreach (rises[i]) if (cyc >= rises[i] && cyc < rises[i] + 30) sig = 1;
      // an edge right after a glitch must still be an edge
      foreach (rises[i]) if (cyc == rises[i]) sig = 1;
      foreach (rises[i]) if (cyc == rises[i] - 1) sig = 0;
    end
    repeat (3) @(negedge clk);
    checks++;
    if (got_sync.size() != exp_sync.size()) begin
      failures++;
      $display("sync count %0d exp %0d, last %0d exp %0d", got_sync.size(), exp_sync.size(), got_sync[got_sync.size()-1], exp_sync[exp_sync.size()-1]);
    end
    foreach (exp_sync[i]) begin
      checks++;
      if (i >= got_sync.size() || got_sync[i] != exp_sync[i]) begin
        failures++;
        if (i < got_sync.size()) $display("sync %0d at %0d exp %0d", i, got_sync[i], exp_sync[i]);
      end
    end
    checks++;
    if (lost_at < 0 || got_lost != lost_at) begin
      failures++;
      $display("lost at %0d exp %0d", got_lost, lost_at);
    end
    checks++;
    if (n_forced != exp_forced || n_ignored != exp_ignored || exp_forced < 5 || exp_ignored < 2) begin
      failures++;
      $display("forced %0d/%0d ignored %0d/%0d", n_forced, exp_forced, n_ignored, exp_ignored);
    end
    // clear drops tracking
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    checks++;
    if (tracking || lost) begin failures++; $display("clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
