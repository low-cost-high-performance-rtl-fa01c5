// tb_serial_interface: a bit-banged master writes every programmable
// register with random values and reads each back, reads the status
// registers, checks the reset defaults, the released SDA outside reads,
// and that a transfer cut short by SEN changes nothing.
module tb_serial_interface;
  import tdd_pkg::*;
  logic clk = 0, rst_n = 0, sck = 0, sen = 0, sda_i = 0;
  logic sda_o, sda_oe;
  status_t status;
  cfg_t cfg;
  int checks = 0, failures = 0;

  serial_interface #(.T_DIG_DEF(51), .T_RF_DEF(0), .T_GEN_DEF(18)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int HALF = 8;   // SCK half period in clocks

  task automatic xfer(bit rd, logic [6:0] a, logic [15:0] wd, output logic [15:0] q, input int nbits = 24);
    logic [23:0] f = {rd, a, wd};
    q = '0;
    @(negedge clk); sen = 1;
    repeat (HALF) @(negedge clk);
    for (int i = 23; i > 23 - nbits; i--) begin
      sda_i = f[i];
      repeat (HALF) @(negedge clk);
      sck = 1;
      if (i < 16) q = {q[14:0], (sda_oe ? sda_o : 1'b0)};
      if (i < 16 && rd && !sda_oe) begin failures++; $display("sda not driven"); end
      repeat (HALF) @(negedge clk);
      sck = 0;
    end
    repeat (HALF) @(negedge clk);
    sen = 0;
    repeat (HALF) @(negedge clk);
  endtask

  task automatic wr(logic [6:0] a, logic [15:0] d);
    logic [15:0] q;
    xfer(0, a, d, q);
  endtask

  task automatic rd_check(logic [6:0] a, logic [15:0] exp, string what);
    logic [15:0] q;
    xfer(1, a, 16'h0, q);
    checks++;
    if (q !== exp) begin failures++; $display("%s: read %h exp %h", what, q, exp); end
  endtask

  initial begin
    logic [15:0] v [7];
    logic [15:0] q;
    status = '{locked: 1'b1, mode_valid: 1'b1, mode: MODE_24_18, meas_high: 16'd2799, meas_period: 16'd5001,
              t_delay: 16'd4892, resyncs: 8'd7};
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    rd_check(REG_CTRL, 16'h0001, "ctrl default");
    rd_check(REG_T_DIG, 16'd51, "t_dig default");
    rd_check(REG_T_GEN, 16'd18, "t_gen default");
    rd_check(REG_STATUS, 16'h000E, "status");
    rd_check(REG_MEAS_HIGH, 16'd2799, "meas high");
    rd_check(REG_MEAS_PER, 16'd5001, "meas period");
    rd_check(REG_T_DELAY, 16'd4892, "t_delay");
    rd_check(REG_RESYNCS, 16'd7, "resyncs");
    rd_check(7'h55, 16'h0000, "unknown");
    for (int r = 0; r < 7; r++) begin
      v[r] = 16'($urandom);
      if (r == 0) v[r] = 16'h0000;
      wr(7'(r), v[r]);
    end
    rd_check(REG_CTRL, {15'b0, v[0][0]}, "ctrl");
    for (int r = 1; r < 7; r++) rd_check(7'(r), v[r], "reg");
    checks++;
    if (cfg.enable !== 1'b0 || cfg.t_dig !== v[1] || cfg.t_rf !== v[2] || cfg.t_gen !== v[3] ||
        cfg.trim_all !== v[4] || cfg.trim_rise !== v[5] || cfg.trim_fall !== v[6]) begin
      failures++;
      $display("cfg outputs");
    end
    // cut short after 20 bits: no write
    xfer(0, REG_T_RF, 16'h1234, q, 20);
    rd_check(REG_T_RF, v[2], "short transfer");
    checks++;
    if (sda_oe) begin failures++; $display("sda_oe idle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
