// tb_ref_gen_side2: three-phase sine references. With a fast frequency word
// the registered outputs are compared every clock with amp*sin(theta -
// p*2pi/3) computed with $sin from the tb's own phase accumulator; they must
// agree within 0.05 % of the amplitude plus one LSB, and the three phases
// must sum to zero within the three phase tolerances.
module tb_ref_gen_side2;
  import ft_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [31:0] freq_word;
  volt_t amp;
  volt_t v_ref [3];
  int checks = 0, failures = 0;

  ref_gen_side2 dut (.clk, .rst_n, .freq_word, .amp, .v_ref);

  always #5 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned theta;
    real th, ex, tol;
    int sum;
    amp = volt_t'(16 * 300);
    freq_word = 32'd1234567;
    repeat (3) @(negedge clk);
    rst_n = 1;
    theta = 0;
    // outputs are registered from the accumulator value before its update
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      th = real'(theta) / 4294967296.0 * 2.0 * 3.14159265358979;
      tol = 0.0005 * real'(amp) + 1.5;
      for (int p = 0; p < 3; p++) begin
        ex = real'(amp) * $sin(th - real'(p) * 2.0 * 3.14159265358979 / 3.0);
        if (p == 2) ex = real'(amp) * $sin(th + 2.0 * 3.14159265358979 / 3.0);
        checks++;
        if (real'(v_ref[p]) - ex > tol || ex - real'(v_ref[p]) > tol) begin
          failures++;
          if (failures < 10) $display("FAIL phase %0d: %0d expected %f", p, v_ref[p], ex);
        end
      end
      sum = int'(v_ref[0]) + int'(v_ref[1]) + int'(v_ref[2]);
      checks++;
      if (real'(sum) > 3.0 * tol || real'(sum) < -3.0 * tol) begin
        failures++;
        $display("FAIL unbalanced sum %0d", sum);
      end
      theta = (theta + 64'(freq_word)) % 64'h1_0000_0000;
      if (i == 10000) begin amp = volt_t'(16 * 50); freq_word = 32'd9876543; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
