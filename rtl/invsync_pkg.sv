// invsync_pkg: types, constants and bound arithmetic shared by the
// distributed-inverter synchronisation controller.
//
// Currents are carried as signed integers with a 1 mA LSB, so 6.49 A is
// code 6490. The comparator bounds themselves sit on a coarser 10 mA grid,
// the precision assumed for the comparators.
//
// The comparator bounds follow LB = min(I0)/N and UB = max(I0)/N, with the
// load-current range split evenly over the N inverters. Because the
// comparators resolve only 10 mA, each bound is moved strictly inside the
// range onto the 10 mA grid: LB is the first grid point above min(I0)/N and UB the
// last grid point below max(I0)/N. With a 10 A to 13 A load this gives
// 5.01/6.49 A for N = 2, 3.34/4.33 A for N = 3, 2.51/3.24 A for N = 4,
// 2.01/2.59 A for N = 5 and 1.67/2.16 A for N = 6.
package invsync_pkg;

  // Width of a current sample in 1 mA units (+/-524.287 A range).
  localparam int unsigned CURRENT_W = 20;
  // Grid of the comparator bounds, in mA.
  localparam int unsigned BOUND_GRID_MA = 10;
  typedef logic signed [CURRENT_W-1:0] current_t;

  // The two PWM states: S0 drives the bridge high, S1 drives it low.
  typedef enum logic {
    PWM_S0_HIGH = 1'b0,
    PWM_S1_LOW  = 1'b1
  } pwm_state_e;

  // Default operating point: 10 A minimum and 13 A maximum load current,
  // 1000 clock cycles per PWM half period (10 us at 100 MHz -> 50 kHz).
  localparam int unsigned LOAD_MIN_MA_DEFAULT = 10000;
  localparam int unsigned LOAD_MAX_MA_DEFAULT = 13000;
  localparam int unsigned HALF_PERIOD_DEFAULT = 1000;

  // Lower bound in mA: first 10 mA grid point strictly above min_ma / n.
  function automatic int lower_bound_ma(input int unsigned min_ma, input int unsigned n);
    return (int'(min_ma / (n * BOUND_GRID_MA)) + 1) * int'(BOUND_GRID_MA);
  endfunction

  // Upper bound in mA: last 10 mA grid point strictly below max_ma / n.
  function automatic int upper_bound_ma(input int unsigned max_ma, input int unsigned n);
    return (int'((max_ma + n * BOUND_GRID_MA - 1) / (n * BOUND_GRID_MA)) - 1) * int'(BOUND_GRID_MA);
  endfunction

endpackage
