// tb_offset_generator: random trims; each output must be the sum of the
// common and the edge's own trim, limited to +/-TRIM_MAX, one clock later.
module tb_offset_generator;
  import tdd_pkg::*;
  localparam int MAXT = 15;
  logic  clk = 0, rst_n = 0;
  trim_t trim_all = 0, trim_rise = 0, trim_fall = 0, rise_off, fall_off;
  int checks = 0, failures = 0;

  offset_generator #(.TRIM_MAX(MAXT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lim(int v);
    return (v > MAXT) ? MAXT : (v < -MAXT) ? -MAXT : v;
  endfunction

  initial begin
    int a, r, f;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      a = $urandom_range(0, 40) - 20;
      r = $urandom_range(0, 40) - 20;
      f = $urandom_range(0, 40) - 20;
      @(negedge clk);
      trim_all = trim_t'(a); trim_rise = trim_t'(r); trim_fall = trim_t'(f);
      @(negedge clk);
      checks++;
      if (int'(rise_off) != lim(a + r) || int'(fall_off) != lim(a + f)) begin
        failures++;
        $display("trims %0d %0d %0d -> %0d %0d", a, r, f, rise_off, fall_off);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
