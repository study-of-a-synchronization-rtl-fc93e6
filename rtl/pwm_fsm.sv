// pwm_fsm: the two-state machine that generates an inverter's PWM signal.
//
// State S0 drives `pwm` high (bridge at +VDC/2), state S1 drives it low
// (bridge at -VDC/2). The machine leaves reset in S0, so the PWM always
// starts high. It changes state on either of two events:
//   * time-out: it has spent HALF_PERIOD clock cycles in the state
//     (1000 cycles = 10 us at 100 MHz, i.e. a 50 kHz free-running PWM);
//   * resynchronisation: `sync_reset` is high and at least RESET_HOLDOFF
//     rising edges have passed since the state was entered. A reset pulse
//     in the first cycle of a state is ignored, so the PWM cannot flip
//     twice in a row on one current excursion.
// Both events toggle the state and restart the cycle counter.
//
// The two states, the time-out of 1000 cycles, the reset-driven transition,
// the default state S0 and the one-edge hold-off follow the design. How the
// hold-off is counted (cycles since entry, compared with RESET_HOLDOFF) and
// the event outputs are this implementation's choices.
//
// Timing: all outputs are registered or decoded from registers, except the
// event strobes `resync`, `timeout` and `reset_ignored`, which are
// combinational and mark the rising edge at which the event takes effect.
module pwm_fsm
  import invsync_pkg::*;
#(
  parameter int unsigned HALF_PERIOD   = HALF_PERIOD_DEFAULT,
  parameter int unsigned RESET_HOLDOFF = 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sync_reset,
  output logic       pwm,
  output pwm_state_e state,
  output logic       resync,
  output logic       timeout,
  output logic       reset_ignored
);

  localparam int unsigned CNT_W = (HALF_PERIOD > 1) ? $clog2(HALF_PERIOD) : 1;
  typedef logic [CNT_W-1:0] cnt_t;

  localparam cnt_t LAST    = cnt_t'(HALF_PERIOD - 1);
  localparam cnt_t HOLDOFF = cnt_t'(RESET_HOLDOFF);

  pwm_state_e state_q;
  cnt_t       cnt_q;      // cycles spent in the current state, 0 in the first
  logic       reset_ok;
  logic       toggle;

  always_comb begin
    reset_ok      = cnt_q >= HOLDOFF;
    timeout       = cnt_q == LAST;
    resync        = sync_reset & reset_ok & ~timeout;
    reset_ignored = sync_reset & ~reset_ok;
    toggle        = timeout | (sync_reset & reset_ok);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= PWM_S0_HIGH;
      cnt_q   <= '0;
    end else if (toggle) begin
      state_q <= (state_q == PWM_S0_HIGH) ? PWM_S1_LOW : PWM_S0_HIGH;
      cnt_q   <= '0;
    end else begin
      cnt_q   <= cnt_q + cnt_t'(1);
    end
  end

  assign state = state_q;
  assign pwm   = (state_q == PWM_S0_HIGH);

  // The counter never passes the time-out value.
  a_cnt_bounded : assert property (@(posedge clk) disable iff (!rst_n) cnt_q <= LAST);
  // A reset pulse can never act in the first cycle of a state.
  a_holdoff : assert property (@(posedge clk) disable iff (!rst_n)
                               (cnt_q < HOLDOFF && !timeout) |=> $stable(state_q));

endmodule
