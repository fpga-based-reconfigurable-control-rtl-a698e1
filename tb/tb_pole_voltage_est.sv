// tb_pole_voltage_est: the estimated pole voltage must be +Vdc/2 for an upper
// switch command of 1 and -Vdc/2 for 0, over random dc-link voltages.
module tb_pole_voltage_est;
  import ft_pkg::*;
  logic t_k;
  volt_t vdc, v_est;
  int checks = 0, failures = 0;

  pole_voltage_est dut (.t_k, .vdc, .v_est);

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int half;
    for (int i = 0; i < 2000; i++) begin
      vdc = volt_t'($urandom_range(0, 16 * 1500));
      t_k = 1'($urandom);
      #1;
      half = int'(vdc) / 2;
      checks++;
      if (int'(v_est) != (t_k ? half : -half)) begin
        failures++;
        $display("FAIL vdc=%0d t=%0b est=%0d", vdc, t_k, v_est);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
