// tb_fault_comp: detection and compensation unit with N = 32, h = 10 V and a
// sample every 4 clocks. An ideal leg model turns the unit's own gate
// commands into measured pole voltages (+/-Vdc/2). For every fault location:
// in six-leg mode gate_hi must follow t6 with gate_lo its complement and no
// triac on; an open upper switch with positive current is then injected
// (the leg reads -Vdc/2 whatever its command) while t6 holds the leg on.
// Detection must take N samples; afterwards the faulty leg's gates are cut,
// the triac of its phase is the only one on, and each other leg follows its
// packed slot of t5. Reset returns to six-leg mode.
module tb_fault_comp;
  import ft_pkg::*;
  localparam int N = 32, DIV = 4;
  logic clk = 0, rst_n = 0;
  volt_t vdc;
  volt_t v_meas [6];
  logic [5:0] t6, gate_hi, gate_lo;
  logic [4:0] t5;
  logic [2:0] triac;
  logic mode5, sample_en;
  leg_t fault_leg;
  logic [5:0] det_count [6];
  int checks = 0, failures = 0;
  int inj = -1;
  int mode_switches = 0;

  fault_comp #(.N(N), .H_VOLTS(10), .SAMPLE_DIV(DIV)) dut (
    .clk, .rst_n, .vdc, .v_meas, .t6, .t5, .gate_hi, .gate_lo, .triac,
    .mode5, .fault_leg, .det_count, .sample_en
  );

  always #5 clk = ~clk;

  // ideal legs; an injected leg has an open upper switch and positive current
  always_comb begin
    for (int k = 0; k < 6; k++) begin
      if (k == inj)            v_meas[k] = -(vdc >>> 1);
      else if (gate_hi[k])     v_meas[k] = vdc >>> 1;
      else                     v_meas[k] = -(vdc >>> 1);
    end
  end

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (inj=%0d) hi=%b lo=%b triac=%b", what, inj, gate_hi, gate_lo, triac);
    end
  endtask

  initial begin
    logic [5:0] t6_q;
    logic [4:0] t5_q;
    int cycles, slot;
    vdc = volt_t'(16 * 400);
    t6 = '0; t5 = '0;
    for (int f = 0; f < 6; f++) begin
      inj = -1;
      rst_n = 0;
      repeat (3) @(negedge clk);
      rst_n = 1;
      // healthy six-leg operation
      for (int i = 0; i < 400; i++) begin
        @(negedge clk);
        t6_q = t6; t5_q = t5;
        t6 = 6'($urandom); t5 = 5'($urandom);
        if (i > 0) begin
          check(gate_hi == t6_q && gate_lo == ~t6_q, "six-leg commands");
          check(triac == 3'b000 && !mode5, "no triac before fault");
        end
      end
      // fault injection with the leg held on so the error persists
      @(negedge clk);
      t6[f] = 1'b1;
      inj = f;
      cycles = 0;
      while (!mode5 && cycles < 10 * N * DIV) begin
        @(negedge clk);
        t6 = 6'($urandom); t6[f] = 1'b1;
        t5 = 5'($urandom);
        cycles++;
      end
      check(mode5, "fault detected");
      check(cycles >= (N - 1) * DIV && cycles <= (N + 1) * DIV + 2, "detection time of N samples");
      check(int'(fault_leg) == f, "fault location");
      if (mode5) mode_switches++;
      // five-leg operation
      for (int i = 0; i < 200; i++) begin
        @(negedge clk);
        t6_q = t6; t5_q = t5;
        t6 = 6'($urandom); t5 = 5'($urandom);
        if (i > 0) begin
          check(triac == 3'(1 << (f % 3)), "triac of the faulty phase only");
          check(!gate_hi[f] && !gate_lo[f], "faulty leg gates cut");
          for (int k = 0; k < 6; k++) if (k != f) begin
            slot = (k < f) ? k : k - 1;
            check(gate_hi[k] == t5_q[slot] && gate_lo[k] == !t5_q[slot], "five-leg commands");
          end
        end
      end
      // a healthy leg would now look faulty too; the first fault stays latched
      inj = (f + 1) % 6;
      repeat (3 * N * DIV) @(negedge clk);
      check(int'(fault_leg) == f && mode5, "first fault kept");
    end
    check(mode_switches == 6, "mode switch at every fault location");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
