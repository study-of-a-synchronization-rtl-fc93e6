// tb_range_comparator: checks the current comparators and their bounds.
//
// One comparator is built for each system size from 2 to 6 inverters with
// the default 10 A..13 A load range; their bounds must be the reference
// configuration (LB/UB in A): 5.01/6.49, 3.34/4.33, 2.51/3.24, 2.01/2.59,
// 1.67/2.16. A sixth instance uses explicit bounds. Each is driven with
// currents around both bounds and with random currents, and `above_ub`,
// `below_lb` and `out_of_range` are compared with the strict comparisons
// against those table values.
`timescale 1ns / 1ps
module tb_range_comparator;
  import invsync_pkg::*;

  localparam int NCFG = 6;
  localparam int LB_TAB [NCFG] = '{5010, 3340, 2510, 2010, 1670, -1500};
  localparam int UB_TAB [NCFG] = '{6490, 4330, 3240, 2590, 2160,  1500};

  current_t i_meas;
  logic [NCFG-1:0] above, below, oor;
  int checks = 0, failures = 0;

  for (genvar c = 0; c < 5; c++) begin : g_n
    range_comparator #(.N_INV(c + 2)) u_cmp (
      .i_meas(i_meas), .above_ub(above[c]), .below_lb(below[c]), .out_of_range(oor[c])
    );
  end
  range_comparator #(.LB_MA(-1500), .UB_MA(1500)) u_cmp_explicit (
    .i_meas(i_meas), .above_ub(above[5]), .below_lb(below[5]), .out_of_range(oor[5])
  );

  task automatic apply(input int value);
    i_meas = current_t'(value);
    #1;
    for (int c = 0; c < NCFG; c++) begin
      bit e_above, e_below;
      e_above = value > UB_TAB[c];
      e_below = value < LB_TAB[c];
      checks++;
      if (above[c] !== e_above || below[c] !== e_below || oor[c] !== (e_above | e_below)) begin
        failures++;
        if (failures < 10)
          $display("FAIL config %0d current %0d mA: above %b below %b oor %b", c, value, above[c], below[c], oor[c]);
      end
    end
  endtask

  initial begin
    for (int c = 0; c < NCFG; c++) begin
      for (int d = -3; d <= 3; d++) begin
        apply(LB_TAB[c] + d);
        apply(UB_TAB[c] + d);
      end
    end
    apply(0);
    apply(-524288);
    apply(524287);
    repeat (2000) apply(int'($urandom_range(16000)) - 2000);
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
