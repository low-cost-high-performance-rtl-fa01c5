// tb_low_level_filter: drives the filter with a frame-like envelope
// (long high and low regions) disturbed by random flips, plus stretches of
// random input, and compares every output sample with a model that keeps
// the last TAPS input samples and applies the k-of-n rule independently.
// It also checks the rise and fall delays of a clean edge.
module tb_low_level_filter;
  localparam int TAPS = 64, TH = 40;
  logic clk = 0, rst_n = 0, tick = 1, din = 0, dout;
  int checks = 0, failures = 0;
  bit win[$];

  low_level_filter #(.TAPS(TAPS), .THRESH(TH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit model();
    int n = 0;
    foreach (win[i]) n += win[i];
    return n >= TH;
  endfunction

  task automatic step(bit v);
    @(negedge clk);
    din = v;
    @(posedge clk);
    win.push_front(v);
    if (win.size() > TAPS) void'(win.pop_back());
    #1;
    checks++;
    if (dout !== model()) begin
      failures++;
      if (failures < 5) $display("mismatch: dout %b exp %b", dout, model());
    end
  endtask

  initial begin
    int t_edge, t_out;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // frames: high region with drop-outs, low region with noise
    for (int f = 0; f < 20; f++) begin
      for (int i = 0; i < 300; i++) step($urandom_range(0, 99) >= 15);
      for (int i = 0; i < 200; i++) step($urandom_range(0, 99) < 15);
    end
    for (int i = 0; i < 2000; i++) step(1'($urandom_range(0, 1)));
    // clean rising edge: output follows after TH samples
    for (int i = 0; i < TAPS; i++) step(0);
    t_out = -1;
    for (int i = 1; i <= TAPS + 2; i++) begin
      step(1);
      if (t_out < 0 && dout) t_out = i;
    end
    checks++;
    if (t_out != TH) begin failures++; $display("rise delay %0d exp %0d", t_out, TH); end
    t_out = -1;
    for (int i = 1; i <= TAPS + 2; i++) begin
      step(0);
      if (t_out < 0 && !dout) t_out = i;
    end
    checks++;
    if (t_out != TAPS - TH + 1) begin failures++; $display("fall delay %0d", t_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
