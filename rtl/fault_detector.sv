// fault_detector: open-switch fault detector for one converter leg, using a
// voltage criterion and a time criterion together.
//
// On every sample strobe the measured pole voltage v_meas is compared with the
// pole voltage expected from the leg's switch command (pole_voltage_est). If
// |v_meas - v_est| exceeds h the up-counter n advances; otherwise it is
// cleared. When n reaches N the leg is declared faulty. Short error pulses
// caused by driver and switch delays at the switching instants therefore never
// reach N. The state flow follows the three states S1 (normal), S2 (counting)
// and S3 (fault); S3 is held until reset, since the system stays in its
// reconfigured mode until maintenance.
//
// H_VOLTS = 10 and N = 32 are the paper's detection parameters. The
// paper's block diagram shows a "> N" comparator while its results declare
// the fault when the counter "reaches" 32; this design follows the latter
// (n == N). An error exactly equal to h clears the counter. With one sample
// per microsecond (SAMPLE_DIV = 80 at 80 MHz in fault_comp) a persistent error
// is flagged 32 us after it appears. `fault` and `count` are registered.
module fault_detector
  import ft_pkg::*;
#(
  parameter int unsigned N       = 32,
  parameter int unsigned H_VOLTS = 10,
  localparam int NW              = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sample_en,
  input  logic          t_k,
  input  volt_t         vdc,
  input  volt_t         v_meas,
  output logic          fault,
  output logic [NW-1:0] count,
  output det_state_e    state
);

  localparam logic [VW:0] H = (VW+1)'(H_VOLTS << VFRAC);

  volt_t              v_est;
  logic signed [VW:0] err;
  logic        [VW:0] err_abs;
  logic               above_h;

  pole_voltage_est u_est (.t_k, .vdc, .v_est);

  always_comb begin
    err     = (VW+1)'(v_meas) - (VW+1)'(v_est);
    err_abs = (err < 0) ? unsigned'(-err) : unsigned'(err);
    above_h = err_abs > H;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= DET_NORMAL;
      count <= '0;
    end else if (sample_en) begin
      unique case (state)
        DET_NORMAL, DET_COUNTING: begin
          if (above_h) begin
            count <= count + 1'b1;
            state <= (count + 1'b1 >= NW'(N)) ? DET_FAULT : DET_COUNTING;
          end else begin
            count <= '0;
            state <= DET_NORMAL;
          end
        end
        default: state <= DET_FAULT;
      endcase
    end
  end

  assign fault = (state == DET_FAULT);

endmodule
