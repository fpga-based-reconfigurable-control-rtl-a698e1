// tb_zss_calc: random and hand-picked reference triples; the zero-sequence
// signal must equal -(max + min) / 2 (rounded toward zero), worked out here
// with plain integer arithmetic.
module tb_zss_calc;
  import ft_pkg::*;
  volt_t va, vb, vc;
  logic signed [VW:0] vz;
  int checks = 0, failures = 0;

  zss_calc dut (.va, .vb, .vc, .vz);

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int a, int b, int c);
    int mx, mn, exp_vz;
    va = volt_t'(a); vb = volt_t'(b); vc = volt_t'(c);
    #1;
    mx = a; if (b > mx) mx = b; if (c > mx) mx = c;
    mn = a; if (b < mn) mn = b; if (c < mn) mn = c;
    exp_vz = -((mx + mn) / 2);
    checks++;
    if (int'(vz) != exp_vz) begin
      failures++;
      $display("FAIL %0d %0d %0d: vz=%0d expected %0d", a, b, c, vz, exp_vz);
    end
  endtask

  initial begin
    // a balanced set at 30 degrees: va = A, vb = -A/2 ... ZSS is -A/4
    run(800, -400, -400);
    run(0, 693, -693);
    run(32767, 32767, -32768);
    run(-32768, -32768, -32768);
    run(5, 2, -8);
    for (int i = 0; i < 2000; i++)
      run(int'($signed(16'($urandom))), int'($signed(16'($urandom))), int'($signed(16'($urandom))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
