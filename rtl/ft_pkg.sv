// ft_pkg: types and helpers shared by the reconfigurable control of the
// 6/5-leg fault-tolerant back-to-back converter.
//
// Voltages (references, dc-link, measured and estimated pole voltages) are
// signed fixed-point words of VW bits with VFRAC fractional bits, i.e. one LSB
// is 1/16 V and the range is +/-2048 V. Modulation signals, which are sums of
// up to three voltages, are MW = VW+2 bits wide so that they never wrap.
//
// Legs are numbered k = 0..5 as a1, b1, c1, a2, b2, c2 (the legs of switches
// S1/S4, S2/S5, S3/S6 on side 1 and S1'/S4', S2'/S5', S3'/S6' on side 2).
// The phase of leg k is k % 3 (a, b, c) and its side is k / 3. The word format
// and the numbering are this design's choice; the paper works in volts.
package ft_pkg;

  localparam int VW    = 16;
  localparam int VFRAC = 4;
  localparam int MW    = VW + 2;

  typedef logic signed [VW-1:0] volt_t;
  typedef logic signed [MW-1:0] mod_t;
  typedef logic [2:0]           leg_t;

  typedef enum logic [1:0] {
    DET_NORMAL   = 2'd0,   // S1 of the detection state flow
    DET_COUNTING = 2'd1,   // S2: error above h, counter running
    DET_FAULT    = 2'd2    // S3: fault declared, held until reset
  } det_state_e;

  // phase (0 = a, 1 = b, 2 = c) and side (0 = side 1, 1 = side 2) of a leg
  function automatic logic [1:0] leg_phase(leg_t k);
    return (k >= 3'd3) ? 2'(k - 3'd3) : 2'(k);
  endfunction

  function automatic logic leg_side(leg_t k);
    return (k >= 3'd3);
  endfunction

  // the leg of phase p on side s
  function automatic leg_t leg_index(logic [1:0] p, logic s);
    return s ? leg_t'(p) + 3'd3 : leg_t'(p);
  endfunction

  // Sine of an 18-bit phase (full turn = 2^18, normally the top bits of a
  // 32-bit phase accumulator) as a Q1.16 signed value.
  // Uses the odd polynomial sin(pi/2*t) ~ t*(a - t^2*(b - c*t^2)) on a quarter
  // wave, t in [0,1] with 16 fractional bits, with a = 1.57032, b = 0.64211,
  // c = 0.07186 (a near-minimax fit); worst error is about 1e-4.
  function automatic logic signed [17:0] sin_q16(logic [17:0] phase);
    logic [1:0]  quad;
    logic [16:0] t;
    logic [33:0] t2, p;
    logic [16:0] mag;
    quad = phase[17:16];
    t    = {1'b0, phase[15:0]};
    if (quad[0]) t = 17'd65536 - t;
    t2  = (34'(t) * 34'(t)) >> 16;
    p   = 34'd42082 - ((34'd4710 * t2) >> 16);
    p   = 34'd102913 - ((p * t2) >> 16);
    p   = (p * 34'(t)) >> 16;
    mag = (p > 34'd65536) ? 17'd65536 : p[16:0];
    return quad[1] ? -$signed({1'b0, mag}) : $signed({1'b0, mag});
  endfunction

endpackage
