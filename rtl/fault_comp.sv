// fault_comp: the "fault detection and compensation" unit. It watches all six
// legs, remembers the first faulty one and reconfigures the gate commands
// from six-leg to five-leg operation.
//
// A sample strobe every SAMPLE_DIV clocks drives six fault_detector instances,
// each comparing a measured pole voltage with the one expected from the upper
// switch command actually sent to that leg. The first leg declared faulty is
// latched (the lowest index wins if two legs trip on the same sample) and the
// unit switches to five-leg mode for good; only reset (maintenance) returns it
// to six-leg mode.
//
// Six-leg mode: gate_hi = t6 (6-leg PWM), gate_lo = ~t6, all triacs off.
// Five-leg mode, fault in leg f = x_i: both gates of leg f are cut, triac T_x
// is turned on, and every other leg k takes the 5-leg PWM command at packed
// slot (k < f ? k : k-1), with the lower switch complementary.
// Outputs are registered: commands change one clock after the detector flags
// the fault. Dead time is left to the gate drivers, which insert it in the
// paper's set-up. Legs are a1, b1, c1, a2, b2, c2; triac[p] is phase p.
module fault_comp
  import ft_pkg::*;
#(
  parameter int unsigned N          = 32,
  parameter int unsigned H_VOLTS    = 10,
  parameter int unsigned SAMPLE_DIV = 80,
  localparam int NW                 = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  volt_t         vdc,
  input  volt_t         v_meas [6],
  input  logic [5:0]    t6,
  input  logic [4:0]    t5,
  output logic [5:0]    gate_hi,
  output logic [5:0]    gate_lo,
  output logic [2:0]    triac,
  output logic          mode5,
  output leg_t          fault_leg,
  output logic [NW-1:0] det_count [6],
  output logic          sample_en
);

  localparam int DW = $clog2(SAMPLE_DIV);

  logic [DW-1:0] div;
  logic [5:0]    det_fault;
  det_state_e    det_state [6];
  logic [5:0]    hi_next;
  logic [5:0]    lo_next;
  logic [2:0]    triac_next;
  leg_t          slot;

  // sample strobe
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div       <= '0;
      sample_en <= 1'b0;
    end else begin
      sample_en <= (div == DW'(SAMPLE_DIV - 1));
      div       <= (div == DW'(SAMPLE_DIV - 1)) ? '0 : div + 1'b1;
    end
  end

  for (genvar k = 0; k < 6; k++) begin : g_det
    fault_detector #(.N(N), .H_VOLTS(H_VOLTS)) u_det (
      .clk, .rst_n, .sample_en,
      .t_k    (gate_hi[k]),
      .vdc,
      .v_meas (v_meas[k]),
      .fault  (det_fault[k]),
      .count  (det_count[k]),
      .state  (det_state[k])
    );
  end

  // latch the first fault; stay in five-leg mode until reset
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode5     <= 1'b0;
      fault_leg <= '0;
    end else if (!mode5 && (det_fault != '0)) begin
      mode5 <= 1'b1;
      for (int k = 5; k >= 0; k--) begin
        if (det_fault[k]) fault_leg <= leg_t'(k);
      end
    end
  end

  always_comb begin
    hi_next    = t6;
    lo_next    = ~t6;
    triac_next = '0;
    slot       = '0;
    if (mode5) begin
      for (int k = 0; k < 6; k++) begin
        if (leg_t'(k) == fault_leg) begin
          hi_next[k] = 1'b0;
          lo_next[k] = 1'b0;
        end else begin
          slot       = (leg_t'(k) < fault_leg) ? leg_t'(k) : leg_t'(k - 1);
          hi_next[k] = (slot <= 3'd4) && t5[slot];
          lo_next[k] = !hi_next[k];
        end
      end
      triac_next[leg_phase(fault_leg)] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gate_hi <= '0;
      gate_lo <= '0;
      triac   <= '0;
    end else begin
      gate_hi <= hi_next;
      gate_lo <= lo_next;
      triac   <= triac_next;
    end
  end

  // a leg's two switches are never commanded on together
  a_complementary: assert property (@(posedge clk) disable iff (!rst_n)
                                    (gate_hi & gate_lo) == '0);
  // at most one triac is ever turned on
  a_one_triac: assert property (@(posedge clk) disable iff (!rst_n)
                                $onehot0(triac));

endmodule
