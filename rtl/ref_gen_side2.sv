// ref_gen_side2: balanced sinusoidal three-phase voltage references for the
// load side (side 2) of the converter.
//
// A 32-bit phase accumulator advances by freq_word every clock (output
// frequency = freq_word * CLK_HZ / 2^32; 50 Hz at 80 MHz is freq_word = 2684).
// The three references are amp*sin(theta), amp*sin(theta - 2*pi/3) and
// amp*sin(theta + 2*pi/3), the sine coming from the polynomial of
// ft_pkg::sin_q16. Outputs are registered. The paper only asks for
// balanced sinusoidal load voltages; amplitude and frequency are inputs here,
// and the generator structure is this design's choice.
module ref_gen_side2
  import ft_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] freq_word,
  input  volt_t       amp,
  output volt_t       v_ref [3]
);

  localparam logic [31:0] THIRD = 32'd1431655765;   // 2^32 / 3

  logic [31:0]        theta;
  logic [31:0]        ph [3];   // low 14 bits only carry the accumulation
  logic signed [17:0] s [3];
  logic signed [VW+18:0] prod [3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) theta <= '0;
    else        theta <= theta + freq_word;
  end

  always_comb begin
    ph[0] = theta;
    ph[1] = theta - THIRD;
    ph[2] = theta + THIRD;
    for (int p = 0; p < 3; p++) begin
      s[p]    = sin_q16(ph[p][31:14]);
      prod[p] = (VW+19)'(amp) * (VW+19)'(s[p]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < 3; p++) v_ref[p] <= '0;
    end else begin
      for (int p = 0; p < 3; p++) v_ref[p] <= VW'(prod[p] >>> 16);
    end
  end

endmodule
