// range_comparator: the pair of current comparators of one inverter controller.
//
// The measured output current of the inverter is compared with an upper
// bound (UB) and a lower bound (LB). `above_ub` is set while the current is
// strictly greater than UB, `below_lb` while it is strictly smaller than LB,
// and `out_of_range` while either holds. The two comparisons ">UB" and "<LB"
// and their merge into one out-of-range signal are the design's; the bound
// values are derived from the load current range and the number of parallel
// inverters (see invsync_pkg), and may be overridden with LB_MA / UB_MA (in mA).
//
// Interface: `i_meas` is a signed current sample with a 1 mA LSB. The block
// is purely combinational; the registering happens in reset_edge_detector.
// How the current is digitised is not part of this design: the sample is
// assumed to be already in the controller's clock domain.
module range_comparator
  import invsync_pkg::*;
#(
  parameter int unsigned N_INV       = 2,
  parameter int unsigned LOAD_MIN_MA = LOAD_MIN_MA_DEFAULT,
  parameter int unsigned LOAD_MAX_MA = LOAD_MAX_MA_DEFAULT,
  parameter int          LB_MA       = lower_bound_ma(LOAD_MIN_MA, N_INV),
  parameter int          UB_MA       = upper_bound_ma(LOAD_MAX_MA, N_INV)
) (
  input  current_t i_meas,
  output logic     above_ub,
  output logic     below_lb,
  output logic     out_of_range
);

  localparam current_t LB = current_t'(LB_MA);
  localparam current_t UB = current_t'(UB_MA);

  always_comb begin
    above_ub     = i_meas > UB;
    below_lb     = i_meas < LB;
    out_of_range = above_ub | below_lb;
  end

endmodule
