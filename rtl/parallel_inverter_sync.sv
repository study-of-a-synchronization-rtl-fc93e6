// parallel_inverter_sync: the logic section of N inverters connected in
// parallel on one load.
//
// The system consists of N identical inverter controllers. Each has its own
// clock and reset and sees only its own output current; nothing connects one
// controller to another. The coupling that synchronises them is physical:
// all inverters feed the same load, so their currents rise and fall
// together, and each controller resets its PWM when its own current leaves
// the per-inverter share [LB, UB] of the load-current range. Adding an
// inverter means adding one more identical controller (and recomputing the
// bounds for the new N); no existing controller changes.
//
// The power section (bridges, line impedances, load) and the current
// measurement are outside this block: `i_meas[k]` comes from inverter k's
// current sensor in the clock domain of `clk[k]`, and `pwm_out[k]` drives
// inverter k's bridge. All controllers use the same bounds, computed for
// N_INV inverters. The per-inverter status outputs are for observation.
module parallel_inverter_sync
  import invsync_pkg::*;
#(
  parameter int unsigned N_INV         = 2,
  parameter int unsigned LOAD_MIN_MA   = LOAD_MIN_MA_DEFAULT,
  parameter int unsigned LOAD_MAX_MA   = LOAD_MAX_MA_DEFAULT,
  parameter int unsigned HALF_PERIOD   = HALF_PERIOD_DEFAULT,
  parameter int unsigned RESET_HOLDOFF = 1
) (
  input  logic                 clk           [N_INV],
  input  logic                 rst_n         [N_INV],
  input  current_t             i_meas        [N_INV],
  output logic     [N_INV-1:0] pwm_out,
  output logic     [N_INV-1:0] above_ub,
  output logic     [N_INV-1:0] below_lb,
  output logic     [N_INV-1:0] resync,
  output logic     [N_INV-1:0] timeout,
  output logic     [N_INV-1:0] reset_ignored
);

  for (genvar k = 0; k < N_INV; k++) begin : g_inv
    pwm_state_e state_k;
    logic       sync_reset_k;

    fpga_controller #(
      .N_INV(N_INV), .LOAD_MIN_MA(LOAD_MIN_MA), .LOAD_MAX_MA(LOAD_MAX_MA),
      .HALF_PERIOD(HALF_PERIOD), .RESET_HOLDOFF(RESET_HOLDOFF)
    ) u_ctrl (
      .clk          (clk[k]),
      .rst_n        (rst_n[k]),
      .i_meas       (i_meas[k]),
      .pwm_out      (pwm_out[k]),
      .state        (state_k),
      .above_ub     (above_ub[k]),
      .below_lb     (below_lb[k]),
      .sync_reset   (sync_reset_k),
      .resync       (resync[k]),
      .timeout      (timeout[k]),
      .reset_ignored(reset_ignored[k])
    );
  end

endmodule
