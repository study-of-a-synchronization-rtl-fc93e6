// tb_parallel_inverter_sync: end-to-end test of the two-inverter system at
// the design's default size (1000-cycle half period, 10 A..13 A load range,
// bounds 5.01 A / 6.49 A), in two side-by-side set-ups, each with its own
// power-stage model (600 V DC link, 250 nH + 1 mOhm lines, 1 mH + 1 mOhm load):
//   A: both controllers on the same 100 MHz clock (ideal lock-step);
//   B: inverter 1 at 100 MHz, inverter 2 at 100.1 MHz started 5 ns late.
// Sequence (1 ms in all): 100 us to settle, 800 us of steady-state
// measurement, 50 us with the current samples held in range (the controllers
// must free-run on the 1000-cycle time-out), 50 us of recovery.
//
// Checks: every PWM output against a cycle-level reference model in both
// set-ups; each mechanism (upper-bound resync, lower-bound resync, reset
// ignored in the hold-off cycle, time-out) seen at least once; in set-up A
// a steady-state PWM frequency within 1 % of 50.668 kHz (the rate set by the
// 1.48 A comparator window) and line currents within 0.1 A of [LB, UB].
// Set-up B reports its frequency and circulating current: with independent
// clocks the switching instants of the two inverters differ by up to a clock
// period, and across 250 nH lines that builds circulating current quickly.
`timescale 1ns / 1fs
module tb_parallel_inverter_sync;
  import invsync_pkg::*;

  localparam int N = 2;

  logic hold_samples = 1'b0;
  logic measuring    = 1'b0;

  logic     clk_a [N], rst_a [N], clk_b [N], rst_b [N];
  current_t im_a [N], im_b [N];
  logic [N-1:0] pwm_a, up_a, lo_a, rs_a, to_a, ig_a;
  logic [N-1:0] pwm_b, up_b, lo_b, rs_b, to_b, ig_b;

  parallel_inverter_sync dut_a (
    .clk(clk_a), .rst_n(rst_a), .i_meas(im_a), .pwm_out(pwm_a), .above_ub(up_a),
    .below_lb(lo_a), .resync(rs_a), .timeout(to_a), .reset_ignored(ig_a)
  );
  inverter_bench_harness #(.N(N), .LB(5010), .UB(6490), .CLOCK_MODE(0)) h_a (
    .clk(clk_a), .rst_n(rst_a), .i_meas(im_a), .pwm_out(pwm_a), .above_ub(up_a),
    .below_lb(lo_a), .resync(rs_a), .timeout(to_a), .reset_ignored(ig_a),
    .hold_samples(hold_samples), .measuring(measuring)
  );

  parallel_inverter_sync dut_b (
    .clk(clk_b), .rst_n(rst_b), .i_meas(im_b), .pwm_out(pwm_b), .above_ub(up_b),
    .below_lb(lo_b), .resync(rs_b), .timeout(to_b), .reset_ignored(ig_b)
  );
  inverter_bench_harness #(.N(N), .LB(5010), .UB(6490), .CLOCK_MODE(1)) h_b (
    .clk(clk_b), .rst_n(rst_b), .i_meas(im_b), .pwm_out(pwm_b), .above_ub(up_b),
    .below_lb(lo_b), .resync(rs_b), .timeout(to_b), .reset_ignored(ig_b),
    .hold_samples(hold_samples), .measuring(measuring)
  );

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    real f_a;
    #100000.0;
    measuring = 1'b1;
    #800000.0;
    measuring = 1'b0;
    f_a = h_a.f_pwm_khz();
    $display("lock-step clocks: f_PWM %0.3f kHz, line current %0.3f..%0.3f A, RMS circulating %0.3e A",
             f_a, h_a.i_min, h_a.i_max, h_a.circ_rms());
    $display("skewed clocks:    f_PWM %0.3f kHz, line current %0.3f..%0.3f A, RMS circulating %0.3e A, peak %0.3f A",
             h_b.f_pwm_khz(), h_b.i_min, h_b.i_max, h_b.circ_rms(), h_b.circ_peak);
    check(f_a > 50.668 * 0.99 && f_a < 50.668 * 1.01, "lock-step PWM frequency near 50.668 kHz");
    check(h_a.i_min > 4.91 && h_a.i_max < 6.59, "lock-step line currents inside the window");
    check(h_a.circ_rms() < 1.0e-6, "lock-step circulating current negligible");
    hold_samples = 1'b1;
    #50000.0;
    hold_samples = 1'b0;
    #50000.0;
    $display("events A: upper %0d, lower %0d, ignored %0d, time-outs %0d",
             h_a.n_upper, h_a.n_lower, h_a.n_ignored, h_a.n_timeout);
    $display("events B: upper %0d, lower %0d, ignored %0d, time-outs %0d",
             h_b.n_upper, h_b.n_lower, h_b.n_ignored, h_b.n_timeout);
    check(h_a.n_upper + h_b.n_upper > 0, "upper-bound resynchronisation happened");
    check(h_a.n_lower + h_b.n_lower > 0, "lower-bound resynchronisation happened");
    check(h_a.n_ignored + h_b.n_ignored > 0, "reset ignored in the hold-off cycle happened");
    check(h_a.n_timeout + h_b.n_timeout > 0, "time-out happened");
    checks   += h_a.checks + h_b.checks;
    failures += h_a.failures + h_b.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1200000.0;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
