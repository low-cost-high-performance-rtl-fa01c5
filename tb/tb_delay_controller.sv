// tb_delay_controller: random latency registers; checks t_delay against
// equation (1) less the RTG/2 advance, with the 1 .. PERIOD-1 limit, and
// counts the ticks from each sync to dsync (tick every second clock).
module tb_delay_controller;
  import tdd_pkg::*;
  logic clk = 0, rst_n = 0, tick = 0, sync_in = 0;
  us_t  t_dig = 0, t_rf = 0, t_gen = 0, t_delay;
  logic dsync;
  int checks = 0, failures = 0;
  int nticks = 0;

  delay_controller dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) tick <= rst_n ? ~tick : 1'b0;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model(int dig, int rf, int gen);
    int d = PERIOD_US - (dig - rf) - gen - RTG_HALF_US;
    if (d < 1) d = 1;
    if (d > PERIOD_US - 1) d = PERIOD_US - 1;
    return d;
  endfunction

  initial begin
    int exp_d, n;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 12; i++) begin
      case (i)
        0: begin t_dig = 51; t_rf = 0; t_gen = 18; end
        1: begin t_dig = 0; t_rf = 6000; t_gen = 0; end     // limit high
        2: begin t_dig = 6000; t_rf = 0; t_gen = 0; end     // limit low
        default: begin
          t_dig = us_t'($urandom_range(0, 400));
          t_rf  = us_t'($urandom_range(0, 100));
          t_gen = us_t'($urandom_range(0, 100));
        end
      endcase
      exp_d = model(t_dig, t_rf, t_gen);
      @(negedge clk);
      checks++;
      if (int'(t_delay) != exp_d) begin
        failures++;
        $display("t_delay %0d exp %0d", t_delay, exp_d);
      end
      // wait for a tick, then give the sync just after it
      @(posedge clk iff tick);
      @(negedge clk); sync_in = 1; @(negedge clk); sync_in = 0;
      n = 0;
      // the sync is taken on the next tick; count ticks until dsync
      @(posedge clk iff tick);
      while (!dsync) begin
        @(posedge clk);
        if (tick) n++;
      end
      checks++;
      if (n != exp_d) begin
        failures++;
        $display("delay %0d ticks exp %0d", n, exp_d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
