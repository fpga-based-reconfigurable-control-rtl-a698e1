// tb_pwm_6leg: six-leg PWM with zero-sequence injection. For random side-1
// and side-2 reference sets, carrier positions and dc-link voltages, the
// registered command of each leg must equal (v* + vz_side) > c*Vdc/CMAX -
// Vdc/2, with vz = -(max + min)/2 of that side, all computed here in real
// arithmetic (near-ties skipped).
module tb_pwm_6leg;
  import ft_pkg::*;
  localparam int CMAX = 5000;
  logic clk = 0, rst_n = 0;
  logic [12:0] carrier;
  volt_t vdc;
  volt_t v1_ref [3], v2_ref [3];
  logic [5:0] t_up;
  int checks = 0, failures = 0;
  bit exp_up [6], valid [6];

  pwm_6leg #(.CMAX(CMAX)) dut (.clk, .rst_n, .carrier, .vdc, .v1_ref, .v2_ref, .t_up);

  always #5 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real zss(real a, real b, real c);
    real mx, mn;
    mx = a; if (b > mx) mx = b; if (c > mx) mx = c;
    mn = a; if (b < mn) mn = b; if (c < mn) mn = c;
    return -(mx + mn) / 2.0;
  endfunction

  initial begin
    real r [6];
    real z1, z2, vd, cv, m;
    carrier = 0; vdc = 0;
    for (int p = 0; p < 3; p++) begin v1_ref[p] = 0; v2_ref[p] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      carrier = 13'($urandom_range(0, CMAX));
      vdc = volt_t'($urandom_range(16 * 100, 16 * 800));
      for (int p = 0; p < 3; p++) begin
        v1_ref[p] = volt_t'($signed($urandom_range(0, 16 * 600)) - 16 * 300);
        v2_ref[p] = volt_t'($signed($urandom_range(0, 16 * 600)) - 16 * 300);
        r[p]     = real'(v1_ref[p]) / 16.0;
        r[p + 3] = real'(v2_ref[p]) / 16.0;
      end
      // the paper's ZSS is applied per side; the RTL rounds vz to 1/16 V
      z1 = zss(r[0], r[1], r[2]);
      z2 = zss(r[3], r[4], r[5]);
      vd = real'(vdc) / 16.0;
      cv = real'(carrier) * vd / CMAX - vd / 2.0;
      for (int k = 0; k < 6; k++) begin
        m = r[k] + ((k < 3) ? z1 : z2);
        exp_up[k] = m > cv;
        // the RTL truncates vz by up to half an LSB (1/32 V)
        valid[k] = (m - cv > 0.04) || (cv - m > 0.04);
      end
      @(negedge clk);
      for (int k = 0; k < 6; k++) if (valid[k]) begin
        checks++;
        if (t_up[k] != exp_up[k]) begin
          failures++;
          if (failures < 10) $display("FAIL leg %0d got %0b", k, t_up[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
