// ft_b2b_ctrl: reconfigurable control of a fault-tolerant 6/5-leg back-to-back
// converter (two three-phase two-level bridges on one dc-link, plus one
// bidirectional switch (triac) per phase joining the two sides' AC terminals).
//
// Before a fault the converter runs as a normal six-leg back-to-back converter
// from the 6-leg PWM. A fault detector per leg compares measured and estimated
// pole voltages; when one leg is found faulty its gates are cut, the triac of
// its phase ties its AC terminal to the same phase's leg on the other side,
// and the remaining five legs are driven by the 5-leg PWM, whose references
// come from double zero-sequence injection. The change is permanent until
// reset.
//
// Data path (all in the 80 MHz clock domain):
//   v1_ref (side-1 references, from an external rectifier controller)
//   ref_gen_side2 -> v2_ref (balanced sinusoidal load-side references)
//   pwm_carrier -> carrier shared by
//     pwm_6leg (ZSS + 6 comparators)            -> t6
//     ref_5leg (double ZSS) -> pwm_compare (5)  -> t5
//   fault_comp (6 detectors, fault latch, command selection)
//     -> gate_hi/gate_lo (12 IGBT commands), triac (3 triac orders)
// v_meas are the six digitised pole voltages (leg terminal to dc-link
// midpoint), vdc the dc-link voltage, all in ft_pkg's 1/16 V format.
// Latency from a reference to a gate command is two clocks in 6-leg mode and
// three in 5-leg mode; gate commands change one clock after detection.
// Defaults: 80 MHz clock, 8 kHz carrier, N = 32, h = 10 V (the paper's values);
// 1 us detector sample period (inferred from N = 32 giving 32 us).
module ft_b2b_ctrl
  import ft_pkg::*;
#(
  parameter int unsigned CLK_HZ     = 80_000_000,
  parameter int unsigned FC_HZ      = 8_000,
  parameter int unsigned N          = 32,
  parameter int unsigned H_VOLTS    = 10,
  parameter int unsigned SAMPLE_DIV = 80,
  localparam int unsigned CMAX      = CLK_HZ / (2 * FC_HZ),
  localparam int CW                 = $clog2(CMAX + 1),
  localparam int NW                 = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  volt_t         vdc,
  input  volt_t         v1_ref [3],
  input  logic [31:0]   freq_word,
  input  volt_t         amp2,
  input  volt_t         v_meas [6],
  output logic [5:0]    gate_hi,
  output logic [5:0]    gate_lo,
  output logic [2:0]    triac,
  output logic          mode5,
  output leg_t          fault_leg,
  output logic [NW-1:0] det_count [6],
  output logic          sample_en,
  output logic [CW-1:0] carrier
);

  volt_t      v2_ref [3];
  mod_t       v5 [5];
  logic [5:0] t6;
  logic [4:0] t5;

  ref_gen_side2 u_ref2 (
    .clk, .rst_n, .freq_word, .amp(amp2), .v_ref(v2_ref)
  );

  pwm_carrier #(.CLK_HZ(CLK_HZ), .FC_HZ(FC_HZ)) u_carrier (
    .clk, .rst_n, .carrier
  );

  pwm_6leg #(.CMAX(CMAX)) u_pwm6 (
    .clk, .rst_n, .carrier, .vdc, .v1_ref, .v2_ref, .t_up(t6)
  );

  ref_5leg u_ref5 (
    .clk, .rst_n, .v1_ref, .v2_ref, .fault_leg, .vout(v5)
  );

  pwm_compare #(.NLEGS(5), .CMAX(CMAX)) u_pwm5 (
    .clk, .rst_n, .carrier, .vdc, .vmod(v5), .t_up(t5)
  );

  fault_comp #(.N(N), .H_VOLTS(H_VOLTS), .SAMPLE_DIV(SAMPLE_DIV)) u_fdc (
    .clk, .rst_n, .vdc, .v_meas, .t6, .t5,
    .gate_hi, .gate_lo, .triac, .mode5, .fault_leg, .det_count, .sample_en
  );

endmodule
