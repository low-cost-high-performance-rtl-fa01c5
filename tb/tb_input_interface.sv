// tb_input_interface: random TTL input, tick every third clock. A model
// keeps the input of two clocks back and checks sig_out and the edge
// pulses after every tick.
module tb_input_interface;
  logic clk = 0, rst_n = 0, tick = 0, tdd_in = 0;
  logic sig_out, rise, fall;
  int checks = 0, failures = 0;
  logic [1:0] hist;
  logic model, model_prev;

  input_interface dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int ph = 0;
    hist = 0; model = 0; model_prev = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      tdd_in = ($urandom_range(0, 9) < 4) ? ~tdd_in : tdd_in;
      tick = (ph == 2);
      ph = (ph + 1) % 3;
      @(posedge clk);
      // model of the clock edge just taken
      if (tick) begin model_prev = model; model = hist[1]; end
      hist = {hist[0], tdd_in};
      #1;
      if (tick) begin
        checks++;
        if (sig_out !== model || rise !== (model & ~model_prev) || fall !== (~model & model_prev)) begin
          failures++;
          if (failures < 5) $display("mismatch at %0d: sig %b exp %b", i, sig_out, model);
        end
      end else begin
        checks++;
        if (rise || fall) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
