// tb_load_fault_50hz: the paper's two open-switch cases on leg c2 with
// running 50 Hz references, at the top's default parameters.
//
// The load side follows the Table I RL load (R = 2.75 ohm, L = 9 mH): each
// load current lags its voltage reference by atan(2*pi*50*L/R) = 45.8 deg
// (50 Hz, a 500 V dc-link and the amplitudes, 80 V load side and 120 V source
// side, are this test's choices, kept inside the five-leg voltage range:
// each five-leg reference peaks below 0.866*(120+80) = 173 V < Vdc/2).
// Side-1 references are 50 Hz sinusoids generated here, with
// currents in phase. Only the current signs matter to the leg model.
//   case 1: S6' opens at the negative peak of the c2 current; the fault must
//           be found within 0.5 ms.
//   case 2: S6' opens just after the c2 current turns positive; no fault may
//           be flagged while it stays positive, and the fault must be found
//           within 1 ms of the current turning negative.
// In both cases, for 10 ms after the switch to five-leg mode, the average
// line-to-line voltages at both AC sides over each carrier period must match
// the references at the middle of that period within 2 V, showing that the
// load and source keep their voltages through the reconfiguration.
module tb_load_fault_50hz;
  import ft_pkg::*;
  localparam int CMAX = 5000;
  localparam int PERIOD = 2 * CMAX;
  localparam real VDC = 500.0;
  localparam real PI = 3.14159265358979;
  localparam real PHI = 0.7994;             // atan(2*pi*50*0.009/2.75)
  localparam real A1 = 120.0, A2 = 80.0, SHIFT1 = 0.3;
  localparam logic [31:0] FW = 32'd2684;    // 50 Hz at 80 MHz

  logic clk = 0, rst_n = 0;
  volt_t vdc, amp2;
  volt_t v1_ref [3];
  logic [31:0] freq_word;
  volt_t v_meas [6];
  logic [5:0] gate_hi, gate_lo;
  logic [2:0] triac;
  logic mode5, sample_en;
  leg_t fault_leg;
  logic [5:0] det_count [6];
  logic [12:0] carrier;
  logic [5:0] i_pos, open_hi, open_lo;
  logic [31:0] theta;                      // this test's own phase

  int checks = 0, failures = 0;
  int n_detect = 0, n_masked = 0, n_line = 0;

  ft_b2b_ctrl dut (
    .clk, .rst_n, .vdc, .v1_ref, .freq_word, .amp2, .v_meas,
    .gate_hi, .gate_lo, .triac, .mode5, .fault_leg, .det_count, .sample_en, .carrier
  );

  leg_plant_model #(.DELAY(120)) plant (
    .clk, .vdc, .gate_hi, .gate_lo, .triac, .i_pos, .open_hi, .open_lo, .v_meas
  );

  always #5 clk = ~clk;

  initial begin
    #20000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real ang(logic [31:0] th);
    return real'(th) / 4294967296.0 * 2.0 * PI;
  endfunction

  function automatic real ref_of(int k, real a);
    real off;
    off = (k % 3 == 0) ? 0.0 : (k % 3 == 1) ? -2.0 * PI / 3.0 : 2.0 * PI / 3.0;
    return (k < 3) ? A1 * $sin(a + SHIFT1 + off) : A2 * $sin(a + off);
  endfunction

  function automatic real cur_of(int k, real a);
    real off;
    off = (k % 3 == 0) ? 0.0 : (k % 3 == 1) ? -2.0 * PI / 3.0 : 2.0 * PI / 3.0;
    return (k < 3) ? $sin(a + SHIFT1 + off) : $sin(a + off - PHI);
  endfunction

  // phase accumulator mirroring the generator's, plus the plant currents and
  // the side-1 references
  always @(posedge clk) begin
    if (!rst_n) theta <= '0;
    else        theta <= theta + FW;
  end

  always @(negedge clk) begin
    for (int p = 0; p < 3; p++) v1_ref[p] = volt_t'($rtoi(ref_of(p, ang(theta)) * 16.0));
    for (int k = 0; k < 6; k++) i_pos[k] = cur_of(k, ang(theta)) > 0.0;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // one carrier period: average line-to-line voltages at the AC terminals
  task automatic check_line_voltages(int f);
    int high [6];
    real mid, term [3], got, want;
    while (carrier != 0) @(negedge clk);
    for (int k = 0; k < 6; k++) high[k] = 0;
    mid = 0.0;
    for (int c = 0; c < PERIOD; c++) begin
      @(negedge clk);
      for (int k = 0; k < 6; k++) high[k] += int'(gate_hi[k]);
      if (c == CMAX) mid = ang(theta) - 2.0 * PI * real'(FW) * 3.0 / 4294967296.0;
    end
    for (int s = 0; s < 2; s++) begin
      for (int p = 0; p < 3; p++) begin
        automatic int k = 3 * s + p;
        if (k == f) k = (k < 3) ? k + 3 : k - 3;
        term[p] = (real'(high[k]) / PERIOD - 0.5) * VDC;
      end
      for (int p = 0; p < 2; p++) begin
        got = term[p] - term[p + 1];
        want = ref_of(3 * s + p, mid) - ref_of(3 * s + p + 1, mid);
        check(got - want < 2.0 && want - got < 2.0,
              $sformatf("side %0d line voltage %0d: %f V expected %f V", s + 1, p, got, want));
        n_line++;
      end
    end
  endtask

  task automatic do_reset();
    rst_n = 0;
    open_hi = '0; open_lo = '0;
    repeat (5) @(negedge clk);
    rst_n = 1;
  endtask

  initial begin
    int waited;
    vdc = volt_t'(int'(VDC * 16));
    amp2 = volt_t'(int'(A2 * 16));
    freq_word = FW;
    open_hi = '0; open_lo = '0;

    // ---- case 1: fault at the negative peak of the c2 current
    do_reset();
    repeat (10 * 80000) @(negedge clk);                 // 10 ms healthy
    check(!mode5, "no false detection in healthy operation");
    while (!(cur_of(5, ang(theta)) < -0.999)) @(negedge clk);
    open_lo[5] = 1'b1;
    waited = 0;
    while (!mode5 && waited < 40000) begin @(negedge clk); waited++; end
    $display("case 1: detected after %0.1f us", real'(waited) / 80.0);
    check(mode5 && fault_leg == 3'd5, "case 1 fault found in leg c2 within 0.5 ms");
    if (mode5) n_detect++;
    repeat (80) check_line_voltages(5);

    // ---- case 2: fault just after the c2 current turns positive
    do_reset();
    repeat (10 * 80000) @(negedge clk);
    while (!(cur_of(5, ang(theta)) > 0.0 && cur_of(5, ang(theta)) < 0.01)) @(negedge clk);
    open_lo[5] = 1'b1;
    waited = 0;
    while (cur_of(5, ang(theta)) > 0.0) begin
      @(negedge clk);
      waited++;
      if (mode5) break;
    end
    $display("case 2: current stayed positive for %0.2f ms after the fault", real'(waited) / 80000.0);
    check(!mode5, "no detection while the diode of S6' carries the current");
    if (!mode5 && waited > 80000) n_masked++;
    waited = 0;
    while (!mode5 && waited < 80000) begin @(negedge clk); waited++; end
    $display("case 2: detected %0.1f us after the current turned negative", real'(waited) / 80.0);
    check(mode5 && fault_leg == 3'd5, "case 2 fault found within 1 ms of the current reversal");
    if (mode5) n_detect++;
    repeat (80) check_line_voltages(5);

    check(n_detect == 2, "both faults detected");
    check(n_masked == 1, "masked interval exercised");
    check(n_line > 0, "line voltages checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
