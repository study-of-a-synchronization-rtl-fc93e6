// tb_fpga_controller: closed-loop test of one inverter controller with the
// default two-inverter bounds (5.01 A / 6.49 A) and 1000-cycle half period.
//
// A simple current model stands in for the inverter: while the PWM is high
// the output current rises by 1.5 mA per 10 ns clock (0.15 A/us, one
// inverter's share of 300 V across a 2 mH equivalent), and while it is low
// it falls at the same rate. The current is sampled with 1 mA resolution on
// the falling clock edge.
// Phase 1 (closed loop): the controller must hold the current inside the
// window and switch at the rate the window sets: about 988 cycles per half
// period, a PWM frequency within 1 % of 50.668 kHz.
// Phase 2: the sample is frozen at 8 A, above the window. Exactly one
// resynchronisation pulse must follow, after which the PWM free-runs with
// time-outs exactly 1000 cycles apart.
`timescale 1ns / 1ps
module tb_fpga_controller;
  import invsync_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  current_t   i_meas;
  logic       pwm_out, above_ub, below_lb, sync_reset, resync, timeout, reset_ignored;
  pwm_state_e state;

  int  checks = 0, failures = 0;
  longint i_ua = 64'd5000000;        // model current in uA, starts at 5 A
  bit  frozen = 0;

  fpga_controller dut (
    .clk(clk), .rst_n(rst_n), .i_meas(i_meas), .pwm_out(pwm_out), .state(state),
    .above_ub(above_ub), .below_lb(below_lb), .sync_reset(sync_reset),
    .resync(resync), .timeout(timeout), .reset_ignored(reset_ignored)
  );

  always #5 clk = ~clk;

  always @(negedge clk) begin
    if (rst_n) i_ua <= pwm_out ? i_ua + 1500 : i_ua - 1500;
    i_meas <= frozen ? current_t'(8000) : current_t'(i_ua / 1000);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    int cyc, first_rise, last_rise, rises, n_sync, n_to, last_to;
    longint lo, hi;
    real f_khz;
    i_meas = current_t'(5000);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // Phase 1: closed loop.
    rises = 0; lo = 64'd1000000000; hi = 0;
    for (cyc = 0; cyc < 30000; cyc++) begin
      logic pwm_prev;
      pwm_prev = pwm_out;
      @(posedge clk);
      #1;
      if (!pwm_prev && pwm_out) begin
        if (rises == 0) first_rise = cyc;
        last_rise = cyc;
        rises++;
      end
      if (cyc > 2000) begin
        if (i_ua < lo) lo = i_ua;
        if (i_ua > hi) hi = i_ua;
      end
      check(!timeout, "no time-out in closed loop");
    end
    f_khz = (rises - 1) * 100.0e3 / (last_rise - first_rise);
    $display("closed loop: f_PWM %0.3f kHz, current %0d..%0d uA", f_khz, lo, hi);
    check(f_khz > 50.668 * 0.99 && f_khz < 50.668 * 1.01, "PWM frequency set by the window");
    check(lo >= 5000000 && hi <= 6500000, "current held in the window");
    // Phase 2: wait until in range, then freeze the sample above the window.
    while (above_ub || below_lb) @(posedge clk);
    @(negedge clk) frozen = 1;
    n_sync = 0; n_to = 0; last_to = -1;
    for (cyc = 0; cyc < 6000; cyc++) begin
      @(posedge clk);
      if (sync_reset) n_sync++;
      if (timeout) begin
        if (last_to >= 0) check(cyc - last_to == 1000, $sformatf("time-out spacing %0d", cyc - last_to));
        last_to = cyc;
        n_to++;
      end
    end
    check(n_sync == 1, $sformatf("one resync pulse for a held excursion (got %0d)", n_sync));
    check(n_to >= 4, "free-running time-outs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
