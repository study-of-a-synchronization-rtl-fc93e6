// inverter_bench_harness: testbench environment around one parallel-inverter
// controller system (parallel_inverter_sync with N inverters).
//
// It provides, per inverter, a clock, a reset and a current sensor, runs the
// power_section_model on the PWM outputs, and checks the controllers:
//   * clocks: CLOCK_MODE 0 gives every inverter the same 100 MHz clock with
//     no phase shift (ideal lock-step); CLOCK_MODE 1 uses the skewed set-up
//     inverter 1: 100 MHz, inverters 2..6: 100.1 MHz, started 5, 3, 2, 1 and
//     1 ns late;
//   * sensor: the line current is sampled on the falling clock edge with a
//     1 mA step and saturates at the 20-bit range;
//   * scoreboard: an independent cycle-level model of each controller, fed
//     the same samples, is compared with every PWM output on every cycle;
//   * counters: resynchronisations from the upper and the lower bound,
//     resets ignored in the first cycle of a state, and time-outs, with a
//     check that each time-out comes exactly HALF cycles after the state was
//     entered;
//   * measurements while `measuring` is high: PWM frequency of inverter 1,
//     range of the line currents, RMS and peak circulating current
//     (line current minus its share of the load current).
// With `hold_samples` high the sensors report a constant in-range value,
// which makes the controllers free-run on their time-out.
`timescale 1ns / 1fs
module inverter_bench_harness
  import invsync_pkg::*;
#(
  parameter int N          = 2,
  parameter int LB         = 5010,
  parameter int UB         = 6490,
  parameter int HALF       = 1000,
  parameter int CLOCK_MODE = 0
) (
  output logic           clk    [N],
  output logic           rst_n  [N],
  output current_t       i_meas [N],
  input  logic [N-1:0]   pwm_out,
  input  logic [N-1:0]   above_ub,
  input  logic [N-1:0]   below_lb,
  input  logic [N-1:0]   resync,
  input  logic [N-1:0]   timeout,
  input  logic [N-1:0]   reset_ignored,
  input  logic           hold_samples,
  input  logic           measuring
);

  localparam real FREQ_MHZ [6] = '{100.0, 100.1, 100.1, 100.1, 100.1, 100.1};
  localparam real DELAY_NS [6] = '{0.0, 5.0, 3.0, 2.0, 1.0, 1.0};

  real i_line [N];
  real i_load, v_load;

  int checks = 0, failures = 0;
  int n_upper = 0, n_lower = 0, n_timeout = 0, n_ignored = 0;

  power_section_model #(.N(N)) plant (
    .gate(pwm_out), .i_line(i_line), .i_load(i_load), .v_load(v_load)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL [N=%0d mode %0d] %s at %0t", N, CLOCK_MODE, what, $time);
    end
  endtask

  function automatic current_t sense(input real amps);
    real ca;
    ca = $floor(amps * 1000.0);
    if (ca > 524287.0) ca = 524287.0;
    if (ca < -524288.0) ca = -524288.0;
    return current_t'($rtoi(ca));
  endfunction

  for (genvar k = 0; k < N; k++) begin : g_inv
    localparam real FMHZ  = (CLOCK_MODE == 0) ? 100.0 : FREQ_MHZ[k];
    localparam real DLY   = (CLOCK_MODE == 0) ? 0.0   : DELAY_NS[k];
    bit m_state;                 // model: 0 = S0 (PWM high), 1 = S1 (PWM low)
    int m_cnt;
    bit m_oor_q;

    initial begin
      clk[k] = 1'b0;
      #(DLY);
      forever #(500.0 / FMHZ) clk[k] = ~clk[k];
    end

    // Reset is driven high and then low, so the asynchronous reset sees an
    // edge before the power-stage model takes its first step.
    initial begin
      rst_n[k] = 1'b1;
      #0.01;
      rst_n[k] = 1'b0;
      #(52.3 + DLY);
      rst_n[k] = 1'b1;
    end

    always @(negedge clk[k])
      i_meas[k] <= hold_samples ? current_t'((LB + UB) / 2) : sense(i_line[k]);

    always @(posedge clk[k] or negedge rst_n[k]) begin
      if (!rst_n[k]) begin
        m_state = 0; m_cnt = 0; m_oor_q = 0;
      end else begin
        bit oor, pulse, flip;
        oor   = (int'(i_meas[k]) > UB) || (int'(i_meas[k]) < LB);
        pulse = oor && !m_oor_q;
        flip  = (m_cnt == HALF - 1) || (pulse && m_cnt >= 1);
        if (resync[k] && above_ub[k]) n_upper++;
        if (resync[k] && below_lb[k]) n_lower++;
        if (reset_ignored[k]) n_ignored++;
        if (timeout[k]) n_timeout++;
        check(timeout[k] == (m_cnt == HALF - 1), $sformatf("time-out strobe of inverter %0d", k));
        check(reset_ignored[k] == (pulse && m_cnt < 1), $sformatf("hold-off of inverter %0d", k));
        m_oor_q = oor;
        if (flip) begin m_state = !m_state; m_cnt = 0; end
        else m_cnt++;
      end
    end

    always @(negedge clk[k])
      if (rst_n[k] && $realtime > 1.0) check(pwm_out[k] == !m_state, $sformatf("PWM of inverter %0d", k));
  end

  // Measurements.
  real t_first = 0.0, t_last = 0.0;
  int  n_edges = 0;
  real circ_sq = 0.0, circ_peak = 0.0;
  int  circ_n = 0;
  real i_min = 1.0e9, i_max = -1.0e9;

  always @(posedge pwm_out[0]) begin
    if (measuring) begin
      if (n_edges == 0) t_first = $realtime;
      t_last = $realtime;
      n_edges++;
    end
  end

  initial forever begin
    #10.0;
    if (measuring) begin
      for (int k = 0; k < N; k++) begin
        real c;
        c = i_line[k] - i_load / N;
        circ_sq += c * c;
        circ_n++;
        if (c > circ_peak) circ_peak = c;
        if (-c > circ_peak) circ_peak = -c;
        if (i_line[k] < i_min) i_min = i_line[k];
        if (i_line[k] > i_max) i_max = i_line[k];
      end
    end
  end

  function automatic real f_pwm_khz();
    return (n_edges > 1) ? (n_edges - 1) * 1.0e6 / (t_last - t_first) : 0.0;
  endfunction

  function automatic real circ_rms();
    return (circ_n > 0) ? $sqrt(circ_sq / circ_n) : 0.0;
  endfunction

endmodule
