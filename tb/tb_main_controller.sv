// tb_main_controller: walks the controller through search, lock, a short
// gap in stable frames (kept), a loss timeout (loss pulse, back to search,
// output stopped), a disabled output and a lock lost when the mode is
// cleared. LOSS_US is 300 ticks here, tick every clock.
module tb_main_controller;
  localparam int LOSS = 300;
  logic clk = 0, rst_n = 0, tick = 1, enable = 1, frame_ok = 0, stable = 0;
  logic mode_valid = 0, regen_valid = 0;
  logic arm, gen_en, locked, loss;
  int checks = 0, failures = 0, n_loss = 0, loss_cyc = -1, cyc = 0, last_ok = 0;

  main_controller #(.LOSS_US(LOSS)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && loss) begin n_loss++; loss_cyc = cyc; end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ok_pulse();
    @(negedge clk); frame_ok = 1; last_ok = cyc; @(negedge clk); frame_ok = 0;
  endtask

  task automatic expect_st(bit l, bit g, bit a, string what);
    checks++;
    if (locked !== l || gen_en !== g || arm !== a) begin
      failures++;
      $display("%s: locked %b gen %b arm %b", what, locked, gen_en, arm);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    expect_st(0, 0, 0, "reset");
    stable = 1; ok_pulse();
    expect_st(0, 0, 0, "stable, no mode");
    mode_valid = 1; @(negedge clk);
    expect_st(0, 0, 1, "armed");
    regen_valid = 1; @(negedge clk); @(negedge clk);
    expect_st(1, 1, 1, "locked");
    // frames keep coming: stays locked beyond LOSS ticks in total
    for (int i = 0; i < 4; i++) begin
      repeat (LOSS / 2) @(negedge clk);
      ok_pulse();
    end
    expect_st(1, 1, 1, "still locked");
    enable = 0; @(negedge clk);
    expect_st(1, 0, 1, "disabled");
    enable = 1;
    // signal lost: no frame_ok for LOSS ticks
    stable = 0;
    repeat (LOSS + 5) @(negedge clk);
    checks++;
    if (n_loss != 1 || loss_cyc - last_ok < LOSS || loss_cyc - last_ok > LOSS + 3) begin
      failures++;
      $display("loss pulses %0d after %0d", n_loss, loss_cyc - last_ok);
    end
    expect_st(0, 0, 0, "after loss");
    // re-lock, then lose the mode
    stable = 1; ok_pulse(); @(negedge clk); @(negedge clk);
    expect_st(1, 1, 1, "relock");
    mode_valid = 0; @(negedge clk); @(negedge clk);
    expect_st(0, 0, 0, "mode cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
