// leg_plant_model: behavioural model of the six converter legs, the three
// triacs and the pole-voltage measurement, for testbenches only.
//
// Each leg's pole voltage (terminal to dc-link midpoint) is +Vdc/2 when its
// upper switch conducts and -Vdc/2 when its lower switch conducts. A switch
// conducts when commanded on and not faulted (open_hi / open_lo inject
// open-circuit faults). When neither switch conducts the leg current flows
// through a diode: the lower one for a current out of the leg (i_pos = 1,
// voltage -Vdc/2), the upper one otherwise (+Vdc/2). A leg with both gates
// off whose phase triac is on follows the other side's leg of that phase.
// The measured values reach the controller DELAY clocks late, standing for
// driver and switch propagation delays and sensing; this delay makes short
// error pulses at every switching instant.
module leg_plant_model
  import ft_pkg::*;
#(
  parameter int DELAY = 120
) (
  input  logic       clk,
  input  volt_t      vdc,
  input  logic [5:0] gate_hi,
  input  logic [5:0] gate_lo,
  input  logic [2:0] triac,
  input  logic [5:0] i_pos,
  input  logic [5:0] open_hi,
  input  logic [5:0] open_lo,
  output volt_t      v_meas [6]
);

  volt_t v_now [6];
  volt_t line [DELAY][6];
  int    wr = 0;

  always_comb begin
    volt_t half;
    logic  hi_c, lo_c;
    half = vdc >>> 1;
    for (int k = 0; k < 6; k++) begin
      hi_c = gate_hi[k] && !open_hi[k];
      lo_c = gate_lo[k] && !open_lo[k];
      if (hi_c && !lo_c)      v_now[k] = half;
      else if (lo_c && !hi_c) v_now[k] = -half;
      else                    v_now[k] = i_pos[k] ? -half : half;
    end
    for (int k = 0; k < 6; k++) begin
      if (!gate_hi[k] && !gate_lo[k] && triac[k % 3]) begin
        automatic int o = (k < 3) ? k + 3 : k - 3;
        v_now[k] = (gate_hi[o] && !open_hi[o]) ? half : -half;
      end
    end
  end

  initial begin
    for (int d = 0; d < DELAY; d++)
      for (int k = 0; k < 6; k++) line[d][k] = '0;
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < 6; k++) line[wr][k] <= v_now[k];
    wr <= (wr == DELAY - 1) ? 0 : wr + 1;
  end

  always_comb for (int k = 0; k < 6; k++) v_meas[k] = line[wr][k];

endmodule
