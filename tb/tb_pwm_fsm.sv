// tb_pwm_fsm: checks the two-state PWM machine at its default 1000-cycle
// half period.
//
// Phase 1: no resets. After reset the PWM must be high (S0), and it must
// toggle every 1000 cycles exactly: 2000 cycles per period, 50 kHz at
// 100 MHz. Phase 2: random reset pulses, some placed in the first cycle of
// a state, where they must be ignored. Every cycle the PWM level and the
// event strobes are compared with a reference model that counts the cycles
// spent in each state.
`timescale 1ns / 1ps
module tb_pwm_fsm;
  import invsync_pkg::*;

  localparam int HALF = 1000;

  logic clk = 1'b0, rst_n = 1'b0, sync_reset = 1'b0;
  logic pwm, resync, timeout, reset_ignored;
  pwm_state_e state;

  int checks = 0, failures = 0;
  int n_resync = 0, n_ignored = 0, n_timeout = 0;

  pwm_fsm dut (
    .clk(clk), .rst_n(rst_n), .sync_reset(sync_reset), .pwm(pwm), .state(state),
    .resync(resync), .timeout(timeout), .reset_ignored(reset_ignored)
  );

  always #5 clk = ~clk;

  bit m_low = 0;     // model state: 1 = S1 (PWM low)
  int m_cnt = 0;     // cycles spent in the state before this edge

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t (cnt %0d)", what, $time, m_cnt);
    end
  endtask

  // Compare just before each rising edge, then advance the model.
  always @(posedge clk) if (rst_n) begin
    bit e_timeout, e_ok;
    e_timeout = m_cnt == HALF - 1;
    e_ok      = m_cnt >= 1;
    check(pwm == !m_low, "PWM level");
    check(state == (m_low ? PWM_S1_LOW : PWM_S0_HIGH), "state");
    check(timeout == e_timeout, "time-out strobe");
    check(reset_ignored == (sync_reset && !e_ok), "ignored-reset strobe");
    check(resync == (sync_reset && e_ok && !e_timeout), "resync strobe");
    if (timeout) n_timeout++;
    if (resync) n_resync++;
    if (reset_ignored) n_ignored++;
    if (e_timeout || (sync_reset && e_ok)) begin m_low = !m_low; m_cnt = 0; end
    else m_cnt++;
  end

  initial begin
    int last_rise, rises;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check(pwm == 1'b1, "PWM starts high");
    // Phase 1: free-running, measure periods in cycles.
    last_rise = -1; rises = 0;
    for (int cyc = 0; cyc < 8200; cyc++) begin
      logic pwm_prev;
      pwm_prev = pwm;
      @(negedge clk);
      if (!pwm_prev && pwm) begin
        if (last_rise >= 0) check(cyc - last_rise == 2 * HALF, $sformatf("free-running period %0d", cyc - last_rise));
        last_rise = cyc;
        rises++;
      end
    end
    check(rises >= 3, "free-running PWM toggles");
    // Phase 2: random reset pulses, some in the first cycle of a state.
    for (int cyc = 0; cyc < 40000; cyc++) begin
      @(negedge clk);
      sync_reset = ($urandom_range(400) == 0) || (m_cnt == 0 && $urandom_range(3) == 0);
    end
    @(negedge clk) sync_reset = 1'b0;
    check(n_resync > 20 && n_ignored > 5 && n_timeout > 8, "all events seen");
    $display("events: resync %0d, ignored %0d, time-out %0d", n_resync, n_ignored, n_timeout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
