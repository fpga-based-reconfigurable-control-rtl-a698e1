// tb_pwm_carrier: checks the triangular carrier against a reference counter
// model at the default 80 MHz / 8 kHz (HALF = 5000, period 10000 cycles):
// every sample of the count and the number of cycles between successive
// valleys (count 0).
module tb_pwm_carrier;
  localparam int HALF = 5000;
  logic clk = 0, rst_n = 0;
  logic [12:0] carrier;
  int checks = 0, failures = 0;
  int model, dir, last_valley, cyc;

  pwm_carrier dut (.clk, .rst_n, .carrier);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = 0; dir = 1; last_valley = -1; cyc = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (cyc = 0; cyc < 4 * 2 * HALF; cyc++) begin
      if (cyc > 0) @(negedge clk);
      check(carrier == 13'(model), "carrier value");
      if (carrier == 0) begin
        if (last_valley >= 0) check(cyc - last_valley == 2 * HALF, "carrier period");
        last_valley = cyc;
      end
      model = model + dir;
      if (model == HALF) dir = -1;
      if (model == 0) dir = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
