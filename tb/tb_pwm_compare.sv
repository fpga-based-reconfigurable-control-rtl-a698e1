// tb_pwm_compare: five-leg comparator bank at CMAX = 5000. Random carrier
// positions, dc-link voltages and modulation signals; each registered command
// must be 1 exactly when v > c*Vdc/CMAX - Vdc/2, computed here in real
// arithmetic (ties are skipped). A second part sweeps a full carrier period
// and checks the duty cycle of each leg against (v + Vdc/2)/Vdc.
module tb_pwm_compare;
  import ft_pkg::*;
  localparam int CMAX = 5000;
  logic clk = 0, rst_n = 0;
  logic [12:0] carrier;
  volt_t vdc;
  mod_t vmod [5];
  logic [4:0] t_up;
  int checks = 0, failures = 0;
  bit exp_up [5];
  bit valid [5];
  int high [5];

  pwm_compare #(.NLEGS(5), .CMAX(CMAX)) dut (.clk, .rst_n, .carrier, .vdc, .vmod, .t_up);

  always #5 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real volts(int code);
    return real'(code) / 16.0;
  endfunction

  initial begin
    real cv, vd, v;
    carrier = 0; vdc = 0;
    for (int k = 0; k < 5; k++) vmod[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      carrier = 13'($urandom_range(0, CMAX));
      vdc = volt_t'($urandom_range(16 * 50, 16 * 800));
      vd = volts(int'(vdc));
      cv = real'(carrier) * vd / CMAX - vd / 2.0;
      for (int k = 0; k < 5; k++) begin
        vmod[k] = mod_t'($signed($urandom_range(0, 2 * 16 * 500)) - 16 * 500);
        v = volts(int'(vmod[k]));
        exp_up[k] = v > cv;
        valid[k] = (v - cv > 1e-9) || (cv - v > 1e-9);
      end
      @(negedge clk);
      for (int k = 0; k < 5; k++) if (valid[k]) begin
        checks++;
        if (t_up[k] != exp_up[k]) begin
          failures++;
          if (failures < 10) $display("FAIL leg %0d c=%0d vdc=%0d v=%0d got %0b", k, carrier, vdc, vmod[k], t_up[k]);
        end
      end
    end
    // duty-cycle sweep over one carrier period
    vdc = volt_t'(16 * 400);
    vmod[0] = mod_t'(0); vmod[1] = mod_t'(16 * 100); vmod[2] = mod_t'(-16 * 150);
    vmod[3] = mod_t'(16 * 250); vmod[4] = mod_t'(-16 * 190);
    for (int k = 0; k < 5; k++) high[k] = 0;
    for (int c = 0; c <= 2 * CMAX; c++) begin
      @(negedge clk);
      carrier = 13'((c <= CMAX) ? c : 2 * CMAX - c);
      @(posedge clk);
      #1;
      for (int k = 0; k < 5; k++) high[k] += t_up[k];
    end
    for (int k = 0; k < 5; k++) begin
      real duty, expd;
      duty = real'(high[k]) / real'(2 * CMAX + 1);
      expd = volts(int'(vmod[k])) / 400.0 + 0.5;
      if (expd > 1.0) expd = 1.0;
      if (expd < 0.0) expd = 0.0;
      checks++;
      if (duty - expd > 0.001 || expd - duty > 0.001) begin
        failures++;
        $display("FAIL duty leg %0d: %f expected %f", k, duty, expd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
