// tb_ft_b2b_ctrl: end-to-end test of the reconfigurable control at its
// default parameters (80 MHz clock, 8 kHz carrier, N = 32, h = 10 V, one
// detector sample per microsecond), closed around leg_plant_model with
// 1.5 us of measurement delay and a 400 V dc-link.
//
// References: side 1 is held at (60, 15, -75) V; side 2 comes from the
// on-chip generator frozen at theta = 0 with amplitude -100 V, i.e.
// (0, 86.6, -86.6) V. Leg duty cycles over whole carrier periods are
// compared with (m/Vdc + 1/2), where m is the modulation signal worked out
// here from the references: ZSS-injected in six-leg mode, and in five-leg
// mode with the other side's faulty-phase signal added (eq. (2) for leg c2).
// The average line-to-line voltages each side's AC terminals receive (with
// the faulty phase fed through its triac after reconfiguration) must match
// the reference line-to-line voltages in both modes.
//
// Scenarios, each after a reset:
//   A  open lower switch of leg c2 (S6') with the leg current negative:
//      detected about 32 us after the fault, triac Tc on, leg c2 cut.
//   B  the same fault with the current positive: the diode carries it and no
//      fault is seen for two carrier periods; after the current reverses the
//      fault is detected.
//   C  open upper switch of leg a1 (S1) with positive current: triac Ta on,
//      leg a2 shared.
// Mechanisms counted: six-leg duty checks, switching spikes rejected,
// detections, masked fault intervals, mode switches, five-leg duty checks.
module tb_ft_b2b_ctrl;
  import ft_pkg::*;
  localparam int CMAX = 5000;
  localparam int PERIOD = 2 * CMAX;
  localparam real VDC = 400.0;

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

  int checks = 0, failures = 0;
  int n_duty6 = 0, n_duty5 = 0, n_spikes = 0, n_detect = 0, n_masked = 0, n_switch = 0, n_line = 0;
  real r [6];
  bit  was_counting [6];

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

  // switching spikes: a counter that rises and falls back to 0 without a trip
  always @(posedge clk) begin
    if (rst_n) begin
      for (int k = 0; k < 6; k++) begin
        if (det_count[k] != 0) was_counting[k] <= 1'b1;
        else if (was_counting[k]) begin
          was_counting[k] <= 1'b0;
          n_spikes++;
        end
      end
    end else begin
      for (int k = 0; k < 6; k++) was_counting[k] <= 1'b0;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic real zss(real a, real b, real c);
    real mx, mn;
    mx = a; if (b > mx) mx = b; if (c > mx) mx = c;
    mn = a; if (b < mn) mn = b; if (c < mn) mn = c;
    return -(mx + mn) / 2.0;
  endfunction

  // expected modulation signal of leg k; f < 0 means six-leg mode
  function automatic real mod_of(int k, int f);
    real v [6];
    real z1, z2;
    int x;
    z1 = zss(r[0], r[1], r[2]);
    z2 = zss(r[3], r[4], r[5]);
    for (int p = 0; p < 3; p++) begin
      v[p] = r[p] + z1;
      v[p + 3] = r[p + 3] + z2;
    end
    if (f < 0) return v[k];
    x = f % 3;
    return v[k] + v[(k < 3) ? x + 3 : x];
  endfunction

  // measure each leg's duty over one carrier period, from a valley
  task automatic check_duties(int f);
    int high [6];
    real d, e;
    while (carrier != 0) @(negedge clk);
    for (int k = 0; k < 6; k++) high[k] = 0;
    for (int c = 0; c < PERIOD; c++) begin
      @(negedge clk);
      for (int k = 0; k < 6; k++) high[k] += int'(gate_hi[k]);
    end
    // average line-to-line voltages at both AC sides; a faulty leg's terminal
    // is fed through its triac by the other side's leg of the same phase
    for (int s = 0; s < 2; s++) begin
      real term [3];
      real got, want;
      for (int p = 0; p < 3; p++) begin
        automatic int k = 3 * s + p;
        if (k == f) k = (k < 3) ? k + 3 : k - 3;
        term[p] = (real'(high[k]) / PERIOD - 0.5) * VDC;
      end
      for (int p = 0; p < 2; p++) begin
        got = term[p] - term[p + 1];
        want = r[3 * s + p] - r[3 * s + p + 1];
        check(got - want < 1.6 && want - got < 1.6,
              $sformatf("side %0d line voltage %0d: %f V expected %f V", s + 1, p, got, want));
        n_line++;
      end
    end
    for (int k = 0; k < 6; k++) begin
      if (k == f) begin
        check(high[k] == 0, "faulty leg stays off");
        continue;
      end
      d = real'(high[k]) / PERIOD;
      e = mod_of(k, f) / VDC + 0.5;
      if (e > 1.0) e = 1.0;
      if (e < 0.0) e = 0.0;
      check(d - e < 0.002 && e - d < 0.002, $sformatf("duty leg %0d: %f expected %f", k, d, e));
      if (f < 0) n_duty6++; else n_duty5++;
    end
  endtask

  task automatic do_reset();
    rst_n = 0;
    open_hi = '0; open_lo = '0;
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
  endtask

  // wait for the mode switch; returns the clocks waited, or -1
  task automatic wait_detect(int limit, output int waited);
    waited = 0;
    while (!mode5 && waited < limit) begin
      @(negedge clk);
      waited++;
    end
    if (!mode5) waited = -1;
  endtask

  task automatic check_reconfigured(int f);
    check(mode5 && int'(fault_leg) == f, $sformatf("fault located at leg %0d", f));
    repeat (2) @(negedge clk);
    check(triac == 3'(1 << (f % 3)), "only the faulty phase's triac is on");
    check(!gate_hi[f] && !gate_lo[f], "faulty leg gates cut");
    check((gate_hi & gate_lo) == '0, "no leg shoot-through");
    if (mode5) n_switch++;
  endtask

  initial begin
    int waited;
    vdc = volt_t'(int'(VDC * 16));
    v1_ref[0] = volt_t'(60 * 16); v1_ref[1] = volt_t'(15 * 16); v1_ref[2] = volt_t'(-75 * 16);
    amp2 = volt_t'(-100 * 16);
    freq_word = 0;
    i_pos = 6'b101010;
    r[0] = 60.0; r[1] = 15.0; r[2] = -75.0;
    for (int p = 0; p < 3; p++) r[p + 3] = -100.0 * $sin(-real'(p) * 2.0 * 3.14159265358979 / 3.0);
    r[5] = -100.0 * $sin(2.0 * 3.14159265358979 / 3.0);

    // ---- A: S6' open, leg c2 current negative
    do_reset();
    repeat (3) check_duties(-1);
    check(!mode5 && triac == 0, "healthy run stays in six-leg mode");
    i_pos[5] = 1'b0;
    while (carrier != 13'(CMAX)) @(negedge clk);       // middle of c2's off-time
    open_lo[5] = 1'b1;
    wait_detect(10 * PERIOD, waited);
    $display("A: detected %0d clocks (%0.2f us) after the fault", waited, real'(waited) / 80.0);
    check(waited >= 32 * 80 && waited <= 33 * 80 + 120 + 4, "detection time about 32 us");
    if (waited > 0) n_detect++;
    check_reconfigured(5);
    repeat (3) check_duties(5);

    // ---- B: S6' open while the current is positive: masked, then detected
    do_reset();
    i_pos[5] = 1'b1;
    check_duties(-1);
    open_lo[5] = 1'b1;
    wait_detect(2 * PERIOD, waited);
    check(waited < 0, "no detection while the diode carries the current");
    if (waited < 0) n_masked++;
    i_pos[5] = 1'b0;                              // current zero crossing
    wait_detect(PERIOD + 40 * 80, waited);
    $display("B: detected %0d clocks after the current reversed", waited);
    check(waited > 0, "detected after the current reversal");
    if (waited > 0) n_detect++;
    check_reconfigured(5);
    repeat (2) check_duties(5);

    // ---- C: S1 open, leg a1 current positive
    do_reset();
    i_pos = 6'b101011;
    check_duties(-1);
    open_hi[0] = 1'b1;
    wait_detect(2 * PERIOD, waited);
    $display("C: detected %0d clocks after the fault", waited);
    check(waited > 0, "upper-switch fault detected");
    if (waited > 0) n_detect++;
    check_reconfigured(0);
    repeat (2) check_duties(0);

    $display("mechanisms: duty6=%0d spikes=%0d detect=%0d masked=%0d switch=%0d duty5=%0d",
             n_duty6, n_spikes, n_detect, n_masked, n_switch, n_duty5);
    check(n_duty6 > 0, "six-leg PWM exercised");
    check(n_spikes > 0, "switching spikes rejected");
    check(n_detect == 3, "faults detected");
    check(n_masked > 0, "masked fault exercised");
    check(n_switch == 3, "six- to five-leg switch");
    check(n_duty5 > 0, "five-leg PWM exercised");
    check(n_line > 0, "line voltages checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
