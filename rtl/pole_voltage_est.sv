// pole_voltage_est: estimated pole voltage of one leg (the "Voltage
// Estimation" box of the detection scheme).
//
// With the pole voltage measured from leg terminal k to the dc-link midpoint
// n, a healthy leg sits at +Vdc/2 when its upper switch is commanded on
// (T_k = 1) and at -Vdc/2 otherwise. Combinational. Taking the midpoint as the
// reference and ignoring diode and switch drops are this design's choices;
// the paper gives only the inputs (Vdc and T_k).
module pole_voltage_est
  import ft_pkg::*;
(
  input  logic  t_k,
  input  volt_t vdc,
  output volt_t v_est
);

  volt_t half;

  always_comb begin
    half  = vdc >>> 1;
    v_est = t_k ? half : -half;
  end

endmodule
