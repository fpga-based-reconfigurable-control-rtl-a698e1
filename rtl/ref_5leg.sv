// ref_5leg: double zero-sequence injection for the post-fault five-leg
// converter (the "ZSS" block feeding the 5-leg PWM).
//
// First each side's references get their own ZSS (v_lj = v*_lj + vz_j).
// Then, with the fault in leg x_i (phase x on side i), the triac of phase x
// ties leg x_i's terminal to leg x_(3-i), which is shared from then on.
// Every healthy leg l_j gets the phase-x modulation signal of the other
// side added:  V_lj = v_lj + v_x(3-j). Adding one signal to all three
// terminals of a side is a further zero-sequence term, so each side still
// sees its own line-to-line voltages. For the shared leg this gives
// v_x1 + v_x2, and for a fault in leg c2 it gives the paper's five references:
// VA1 = va1+vc2, VB1 = vb1+vc2, VA2 = va2+vc1, VB2 = vb2+vc1, VC = vc1+vc2.
// The five results are packed in ascending leg order with the faulty leg
// left out: vout[s] is leg s for s < fault_leg and leg s+1 otherwise.
// Outputs are registered (one clock). The generalisation to all six fault
// locations follows the paper's pseudo-code; packing is this design's.
module ref_5leg
  import ft_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  volt_t v1_ref [3],
  input  volt_t v2_ref [3],
  input  leg_t  fault_leg,
  output mod_t  vout [5]
);

  logic signed [VW:0] vz1, vz2;
  mod_t               v [6];
  mod_t               vnew [6];
  logic [1:0]         x;

  zss_calc u_zss1 (.va(v1_ref[0]), .vb(v1_ref[1]), .vc(v1_ref[2]), .vz(vz1));
  zss_calc u_zss2 (.va(v2_ref[0]), .vb(v2_ref[1]), .vc(v2_ref[2]), .vz(vz2));

  always_comb begin
    x = leg_phase(fault_leg);
    for (int p = 0; p < 3; p++) begin
      v[p]     = MW'(v1_ref[p]) + MW'(vz1);
      v[p + 3] = MW'(v2_ref[p]) + MW'(vz2);
    end
    for (int k = 0; k < 6; k++) begin
      // legs of side 1 add phase x of side 2 and vice versa
      vnew[k] = v[k] + v[leg_index(x, !leg_side(leg_t'(k)))];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < 5; s++) vout[s] <= '0;
    end else begin
      for (int s = 0; s < 5; s++) begin
        vout[s] <= (leg_t'(s) < fault_leg) ? vnew[s] : vnew[s + 1];
      end
    end
  end

endmodule
