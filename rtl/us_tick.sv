// us_tick: one-cycle enable pulse every TICK_DIV clock cycles.
//
// Every timing block of the synchronizer counts in these 1 us ticks, so
// the system clock only sets TICK_DIV (10 for a 10 MHz clock; the clock
// frequency is this design's choice, the FPGA was timed up to 91 MHz).
// tick is high for one cycle, first TICK_DIV cycles after reset.
module us_tick #(
  parameter int unsigned TICK_DIV = 10
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);
  localparam int unsigned W = (TICK_DIV > 1) ? $clog2(TICK_DIV) : 1;
  logic [W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt == W'(TICK_DIV - 1)) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end
endmodule
