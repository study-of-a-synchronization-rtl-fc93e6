// reset_edge_detector: turns the comparators' out-of-range level into a
// one-clock synchronisation pulse.
//
// The level is delayed by one clock (a unit delay), inverted and combined
// with the undelayed level, so `sync_reset` is high for exactly one cycle
// when `level` goes from 0 to 1. A current that stays outside its bounds
// therefore produces one reset, not a reset every cycle, which keeps the PWM
// state machine from toggling back and forth. The unit delay follows the
// design; its reset value (0, so a level already high when reset ends gives
// one pulse) is this implementation's choice.
//
// Interface: `level` is sampled on the rising edge of `clk`; `sync_reset` is
// combinational from `level` and the stored sample, valid for the FSM at
// the next rising edge. `rst_n` is an active-low asynchronous reset.
module reset_edge_detector (
  input  logic clk,
  input  logic rst_n,
  input  logic level,
  output logic sync_reset
);

  logic level_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) level_q <= 1'b0;
    else        level_q <= level;
  end

  assign sync_reset = level & ~level_q;

endmodule
