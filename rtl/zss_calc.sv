// zss_calc: zero-sequence signal (ZSS) for one set of three phase references.
//
// The ZSS is added to all three references of one converter side:
// it leaves line-to-line voltages unchanged and widens the usable voltage
// range. The paper does not say which ZSS it uses; the triangular ZSS of
// a quarter of the reference amplitude that it plots matches the min/max
// injection used here: vz = -(max(va,vb,vc) + min(va,vb,vc)) / 2.
// Purely combinational; the result is one bit wider than the inputs.
module zss_calc
  import ft_pkg::*;
(
  input  volt_t                 va,
  input  volt_t                 vb,
  input  volt_t                 vc,
  output logic signed [VW:0]    vz
);

  volt_t vmax, vmin;
  logic signed [VW:0] vsum;

  always_comb begin
    vmax = va;
    vmin = va;
    if (vb > vmax) vmax = vb;
    if (vc > vmax) vmax = vc;
    if (vb < vmin) vmin = vb;
    if (vc < vmin) vmin = vc;
    vsum = (VW+1)'(vmax) + (VW+1)'(vmin);
    // halve rounding toward zero so that symmetric inputs give symmetric ZSS
    vz = -((vsum + ((vsum < 0) ? (VW+1)'(1) : (VW+1)'(0))) >>> 1);
  end

endmodule
