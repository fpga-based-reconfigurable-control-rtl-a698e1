// pwm_carrier: symmetric triangular PWM carrier shared by all leg modulators.
//
// An up/down counter runs 0, 1, ..., HALF, HALF-1, ..., 1, 0, 1, ... so one
// carrier period is 2*HALF clock cycles, with HALF = CLK_HZ / (2*FC_HZ). At the
// paper's 80 MHz board clock and 8 kHz carrier frequency that is 5000,
// i.e. a 10000-cycle (125 us) period. The carrier is a plain count; the
// comparators scale it to the dc-link voltage. The counter shape and the
// carrier being centred on the dc-link midpoint are this design's choice.
module pwm_carrier #(
  parameter int unsigned CLK_HZ = 80_000_000,
  parameter int unsigned FC_HZ  = 8_000,
  localparam int unsigned HALF  = CLK_HZ / (2 * FC_HZ),
  localparam int CW             = $clog2(HALF + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic [CW-1:0] carrier
);

  logic up;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      carrier <= '0;
      up      <= 1'b1;
    end else if (up) begin
      if (carrier == CW'(HALF - 1)) up <= 1'b0;
      carrier <= carrier + 1'b1;
    end else begin
      if (carrier == CW'(1)) up <= 1'b1;
      carrier <= carrier - 1'b1;
    end
  end

endmodule
