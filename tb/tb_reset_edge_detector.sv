// tb_reset_edge_detector: checks that the out-of-range level is turned into
// a single-cycle pulse on its 0 -> 1 transitions only.
//
// The level is driven with random runs of ones and zeros (single-cycle
// blips included) and the pulse is compared every cycle with the level and
// the level of the previous cycle; a reset in the middle of a run of ones
// must make the next cycle's high level count as a new rising edge.
`timescale 1ns / 1ps
module tb_reset_edge_detector;

  logic clk = 1'b0, rst_n = 1'b0, level = 1'b0, sync_reset;
  bit   prev = 1'b0;
  int   checks = 0, failures = 0, n_pulses = 0;

  reset_edge_detector dut (.clk(clk), .rst_n(rst_n), .level(level), .sync_reset(sync_reset));

  always #5 clk = ~clk;

  task automatic check_now();
    checks++;
    if (sync_reset !== (level && !prev)) begin
      failures++;
      if (failures < 10) $display("FAIL at %0t: level %b prev %b pulse %b", $time, level, prev, sync_reset);
    end
    if (sync_reset) n_pulses++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #2 rst_n = 1'b1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      if (cyc == 1500) begin
        level = 1'b1;                       // level high across a reset
        #1 check_now();
        @(posedge clk); prev = level;
        #1 rst_n = 1'b0; prev = 1'b0;
        #1 check_now();                     // after reset the high level is new again
        #1 rst_n = 1'b1;
        @(negedge clk);
      end
      if ($urandom_range(3) == 0) level = ~level;
      #1 check_now();
      @(posedge clk);
      prev = level;
    end
    checks++;
    if (n_pulses < 100) begin
      failures++;
      $display("FAIL only %0d pulses", n_pulses);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
