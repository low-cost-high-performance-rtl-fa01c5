// tb_duration_calculator: generates pulse trains with random high and low
// lengths (tick every clock) and checks that each measurement reports the
// previous high length and the rising-edge to rising-edge period; the
// first rising edge gives no measurement.
module tb_duration_calculator;
  import tdd_pkg::*;
  logic clk = 0, rst_n = 0, tick = 1, sig = 0;
  logic meas_valid;
  us_t  high_us, period_us;
  int checks = 0, failures = 0, nmeas = 0;
  int exp_high[$], exp_per[$];

  duration_calculator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && meas_valid) begin
    checks++;
    nmeas++;
    if (exp_high.size() == 0) begin
      failures++;
      $display("unexpected measurement");
    end else begin
      automatic int h = exp_high.pop_front();
      automatic int p = exp_per.pop_front();
      if (int'(high_us) != h || int'(period_us) != p) begin
        failures++;
        $display("meas high %0d period %0d exp %0d %0d", high_us, period_us, h, p);
      end
    end
  end

  task automatic drive(int hi, int lo);
    repeat (hi) begin @(negedge clk); sig = 1; end
    repeat (lo) begin @(negedge clk); sig = 0; end
  endtask

  initial begin
    int hi, lo;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    for (int i = 0; i < 40; i++) begin
      hi = $urandom_range(1, 4000);
      lo = $urandom_range(1, 2000);
      // a measurement appears at the rising edge after this pulse
      exp_high.push_back(hi); exp_per.push_back(hi + lo);
      drive(hi, lo);
    end
    @(negedge clk); sig = 1;
    repeat (5) @(negedge clk);
    checks++;
    if (nmeas != 40 || exp_high.size() != 0) begin
      failures++;
      $display("measurements %0d", nmeas);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
