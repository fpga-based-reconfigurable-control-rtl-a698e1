// pwm_6leg: the pre-fault "6-leg PWM" of the reconfigurable control.
//
// Each side's three voltage references get that side's zero-sequence signal
// added, and the six modulation signals are compared with
// the shared triangular carrier. Output t_up[k] is the upper-switch command of
// leg k (legs a1, b1, c1, a2, b2, c2); the lower switch takes the complement.
// One clock of latency (the comparator register). The paper allows any
// PWM method before the fault; reusing the ZSS injection of the 5-leg mode
// here is this design's choice.
module pwm_6leg
  import ft_pkg::*;
#(
  parameter int unsigned CMAX = 5000,
  localparam int CW           = $clog2(CMAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [CW-1:0] carrier,
  input  volt_t         vdc,
  input  volt_t         v1_ref [3],
  input  volt_t         v2_ref [3],
  output logic [5:0]    t_up
);

  logic signed [VW:0] vz1, vz2;
  mod_t               vmod [6];

  zss_calc u_zss1 (.va(v1_ref[0]), .vb(v1_ref[1]), .vc(v1_ref[2]), .vz(vz1));
  zss_calc u_zss2 (.va(v2_ref[0]), .vb(v2_ref[1]), .vc(v2_ref[2]), .vz(vz2));

  always_comb begin
    for (int p = 0; p < 3; p++) begin
      vmod[p]     = MW'(v1_ref[p]) + MW'(vz1);
      vmod[p + 3] = MW'(v2_ref[p]) + MW'(vz2);
    end
  end

  pwm_compare #(.NLEGS(6), .CMAX(CMAX)) u_cmp (
    .clk, .rst_n, .carrier, .vdc, .vmod, .t_up
  );

endmodule
