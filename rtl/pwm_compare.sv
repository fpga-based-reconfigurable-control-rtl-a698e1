// pwm_compare: carrier comparison for NLEGS converter legs (the "5-leg PWM"
// with NLEGS = 5; the 6-leg PWM uses it with NLEGS = 6).
//
// The triangular carrier (0..CMAX from pwm_carrier) stands for a voltage that
// sweeps the dc-link from -Vdc/2 to +Vdc/2 around its midpoint n. A leg's upper
// switch is commanded on (T_k = 1) while its modulation signal v is above the
// carrier voltage:  v > c*Vdc/CMAX - Vdc/2,  evaluated without division as
// (2v + Vdc)*CMAX > 2*c*Vdc. The lower switch command is the complement and is
// formed downstream. Commands are registered: one clock of latency. The
// dc-link voltage input follows the paper's PWM blocks;
// scaling the carrier by it rather than dividing the references is this
// design's choice. A modulation signal outside +/-Vdc/2 saturates the leg.
module pwm_compare
  import ft_pkg::*;
#(
  parameter int unsigned NLEGS = 5,
  parameter int unsigned CMAX  = 5000,
  localparam int CW            = $clog2(CMAX + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CW-1:0]    carrier,
  input  volt_t            vdc,
  input  mod_t             vmod [NLEGS],
  output logic [NLEGS-1:0] t_up
);

  localparam int PW = MW + 2 + CW + 2;
  localparam logic signed [PW-1:0] CMAX_S = PW'(CMAX);

  logic signed [PW-1:0] rhs;

  always_comb rhs = 2 * PW'(signed'({1'b0, carrier})) * PW'(vdc);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_up <= '0;
    end else begin
      for (int k = 0; k < NLEGS; k++) begin
        t_up[k] <= ((2 * PW'(vmod[k]) + PW'(vdc)) * CMAX_S) > rhs;
      end
    end
  end

endmodule
