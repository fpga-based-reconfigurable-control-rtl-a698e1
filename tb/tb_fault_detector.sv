// tb_fault_detector: one leg's detector with N = 32 and h = 10 V, sampled
// every 4 clocks. A reference model of the counter (+1 while |error| > h,
// cleared otherwise, fault latched once it reaches N) is compared with the
// DUT after every sample. Stimulus: measurement noise below h, an error of
// exactly h, error bursts of 1..N-1 samples (switching spikes) that must
// not trip, and a persistent error that must trip after exactly N samples
// and stay tripped when the error goes away.
module tb_fault_detector;
  import ft_pkg::*;
  localparam int N = 32;
  localparam int H = 10 * 16;
  logic clk = 0, rst_n = 0, sample_en = 0, t_k = 0;
  volt_t vdc, v_meas;
  logic fault;
  logic [5:0] count;
  det_state_e state;
  int checks = 0, failures = 0;
  int m_count = 0;
  bit m_fault = 0;
  int spikes = 0, trips = 0;

  fault_detector #(.N(N), .H_VOLTS(10)) dut (
    .clk, .rst_n, .sample_en, .t_k, .vdc, .v_meas, .fault, .count, .state
  );

  always #5 clk = ~clk;

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
      if (failures < 10) $display("FAIL %s: count=%0d model=%0d fault=%0b", what, count, m_count, fault);
    end
  endtask

  // one sample with the given error (volts*16) between measured and ideal
  task automatic sample(int err);
    int ideal, e;
    @(negedge clk);
    t_k = 1'($urandom);
    ideal = t_k ? int'(vdc) / 2 : -(int'(vdc) / 2);
    v_meas = volt_t'(ideal + err);
    e = (err < 0) ? -err : err;
    sample_en = 1;
    if (!m_fault) begin
      if (e > H) begin
        m_count++;
        if (m_count >= N) m_fault = 1;
      end else m_count = 0;
    end
    @(negedge clk);
    sample_en = 0;
    check(int'(count) == m_count, "counter");
    check(fault == m_fault, "fault flag");
    repeat (2) @(negedge clk);
  endtask

  initial begin
    vdc = volt_t'(16 * 400);
    v_meas = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // noise below h and exactly h
    for (int i = 0; i < 50; i++) sample($signed($urandom_range(0, 2 * H)) - H);
    // switching spikes of random length below N
    for (int i = 0; i < 60; i++) begin
      automatic int len = $urandom_range(1, N - 1);
      for (int j = 0; j < len; j++) sample((j % 2 != 0) ? 16 * 400 : -(H + 1));
      sample(0);
      spikes++;
    end
    check(!fault, "no trip on spikes");
    // persistent error (open switch): trips on the N-th sample exactly
    for (int j = 0; j < N - 1; j++) sample(-16 * 400);
    check(!fault, "not yet tripped after N-1 samples");
    sample(-16 * 400);
    check(fault, "tripped on the N-th sample");
    check(state == DET_FAULT, "state S3");
    if (fault) trips++;
    for (int j = 0; j < 20; j++) sample(0);
    check(fault, "fault is held");
    check(spikes > 0 && trips == 1, "both mechanisms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
