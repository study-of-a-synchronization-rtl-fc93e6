// fpga_controller: the complete control logic of one inverter module.
//
// Each inverter carries an identical copy of this block and runs it from
// its own oscillator, with no link to the other inverters. The measured
// output current is checked against the bounds [LB, UB]; the first cycle in
// which it leaves that range produces a one-clock reset pulse, and the pulse
// forces the PWM state machine into its other state. Between resets the
// machine free-runs with a half period of HALF_PERIOD cycles. In a parallel
// system the shared load current makes every inverter's current cross its
// bounds at the same instant, so the resets pull all PWM signals into step
// and the current that circulates between the inverters stays small.
//
// Datapath: range_comparator (combinational) -> reset_edge_detector (one
// register) -> pwm_fsm (state and cycle counter). A sample of `i_meas`
// present before a rising edge changes `pwm_out` at that edge.
//
// Interface: `i_meas` is the inverter's output current, signed, 1 mA LSB,
// synchronous to `clk`. `pwm_out` is the 0/1 gate signal to the bridge.
// The remaining outputs expose the comparator levels and the FSM events.
module fpga_controller
  import invsync_pkg::*;
#(
  parameter int unsigned N_INV         = 2,
  parameter int unsigned LOAD_MIN_MA   = LOAD_MIN_MA_DEFAULT,
  parameter int unsigned LOAD_MAX_MA   = LOAD_MAX_MA_DEFAULT,
  parameter int          LB_MA         = lower_bound_ma(LOAD_MIN_MA, N_INV),
  parameter int          UB_MA         = upper_bound_ma(LOAD_MAX_MA, N_INV),
  parameter int unsigned HALF_PERIOD   = HALF_PERIOD_DEFAULT,
  parameter int unsigned RESET_HOLDOFF = 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  current_t   i_meas,
  output logic       pwm_out,
  output pwm_state_e state,
  output logic       above_ub,
  output logic       below_lb,
  output logic       sync_reset,
  output logic       resync,
  output logic       timeout,
  output logic       reset_ignored
);

  logic out_of_range;

  range_comparator #(
    .N_INV(N_INV), .LOAD_MIN_MA(LOAD_MIN_MA), .LOAD_MAX_MA(LOAD_MAX_MA),
    .LB_MA(LB_MA), .UB_MA(UB_MA)
  ) u_cmp (
    .i_meas      (i_meas),
    .above_ub    (above_ub),
    .below_lb    (below_lb),
    .out_of_range(out_of_range)
  );

  reset_edge_detector u_edge (
    .clk       (clk),
    .rst_n     (rst_n),
    .level     (out_of_range),
    .sync_reset(sync_reset)
  );

  pwm_fsm #(
    .HALF_PERIOD(HALF_PERIOD), .RESET_HOLDOFF(RESET_HOLDOFF)
  ) u_fsm (
    .clk          (clk),
    .rst_n        (rst_n),
    .sync_reset   (sync_reset),
    .pwm          (pwm_out),
    .state        (state),
    .resync       (resync),
    .timeout      (timeout),
    .reset_ignored(reset_ignored)
  );

endmodule
