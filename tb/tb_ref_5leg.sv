// tb_ref_5leg: double zero-sequence injection. For every fault location and
// random references, the five registered outputs must be the healthy legs'
// ZSS-injected references plus the other side's phase-x signal, packed in
// leg order without the faulty leg. For a fault in leg c2 the outputs are
// also checked term by term against eq. (2): VA1 = va1+vc2, VB1 = vb1+vc2,
// VC = vc1+vc2, VA2 = va2+vc1, VB2 = vb2+vc1.
module tb_ref_5leg;
  import ft_pkg::*;
  logic clk = 0, rst_n = 0;
  volt_t v1_ref [3], v2_ref [3];
  leg_t fault_leg;
  mod_t vout [5];
  int checks = 0, failures = 0;

  ref_5leg dut (.clk, .rst_n, .v1_ref, .v2_ref, .fault_leg, .vout);

  always #5 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int zss(int a, int b, int c);
    int mx, mn;
    mx = a; if (b > mx) mx = b; if (c > mx) mx = c;
    mn = a; if (b < mn) mn = b; if (c < mn) mn = c;
    return -((mx + mn) / 2);
  endfunction

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d (fault leg %0d)", what, got, exp, fault_leg);
    end
  endtask

  initial begin
    int v [6];
    int e [5];
    int n, x, other;
    for (int p = 0; p < 3; p++) begin v1_ref[p] = 0; v2_ref[p] = 0; end
    fault_leg = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      fault_leg = leg_t'($urandom_range(0, 5));
      for (int p = 0; p < 3; p++) begin
        v1_ref[p] = volt_t'($signed($urandom_range(0, 16 * 1000)) - 16 * 500);
        v2_ref[p] = volt_t'($signed($urandom_range(0, 16 * 1000)) - 16 * 500);
      end
      for (int p = 0; p < 3; p++) begin
        v[p]     = int'(v1_ref[p]) + zss(int'(v1_ref[0]), int'(v1_ref[1]), int'(v1_ref[2]));
        v[p + 3] = int'(v2_ref[p]) + zss(int'(v2_ref[0]), int'(v2_ref[1]), int'(v2_ref[2]));
      end
      x = int'(fault_leg) % 3;
      n = 0;
      for (int k = 0; k < 6; k++) begin
        if (k == int'(fault_leg)) continue;
        other = (k < 3) ? x + 3 : x;
        e[n] = v[k] + v[other];
        n++;
      end
      @(negedge clk);
      for (int s = 0; s < 5; s++) check(int'(vout[s]), e[s], "packed reference");
      if (fault_leg == 3'd5) begin
        check(int'(vout[0]), v[0] + v[5], "VA1 = va1 + vc2");
        check(int'(vout[1]), v[1] + v[5], "VB1 = vb1 + vc2");
        check(int'(vout[2]), v[2] + v[5], "VC = vc1 + vc2");
        check(int'(vout[3]), v[3] + v[2], "VA2 = va2 + vc1");
        check(int'(vout[4]), v[4] + v[2], "VB2 = vb2 + vc1");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
