// tb_inverter_count_sweep: runs the parallel-inverter system with 2, 3, 4, 5
// and 6 inverters on the 10 A..13 A load, each with its own bounds, and
// compares the steady-state PWM frequency with the reference results
// (50.668, 50.500, 51.365, 51.720 and 51.017 kHz).
//
// Every size is run twice, side by side: with all controllers on one
// 100 MHz clock (lock-step) and with the skewed clocks (inverter 1 at
// 100 MHz, the others at 100.1 MHz started 5, 3, 2, 1, 1 ns late).
// Checks: the cycle-level scoreboard of every controller in both set-ups;
// in lock-step, the PWM frequency within 1 % of the reference value and the
// line currents within 0.1 A of the bounds. The skewed runs report their
// frequency and circulating current.
`timescale 1ns / 1fs
module tb_inverter_count_sweep;
  import invsync_pkg::*;

  localparam int  NSIZE = 5;
  localparam int  LB_TAB [NSIZE] = '{5010, 3340, 2510, 2010, 1670};
  localparam int  UB_TAB [NSIZE] = '{6490, 4330, 3240, 2590, 2160};
  localparam real F_TAB  [NSIZE] = '{50.668, 50.500, 51.365, 51.720, 51.017};

  logic measuring = 1'b0;
  logic hold      = 1'b0;
  bit   done      = 1'b0;
  int   checks = 0, failures = 0;

  for (genvar s = 0; s < NSIZE; s++) begin : g_size
    localparam int N = s + 2;
    for (genvar mode = 0; mode < 2; mode++) begin : g_mode
      logic     clk [N], rst_n [N];
      current_t i_meas [N];
      logic [N-1:0] pwm, up, lo, rs, to, ig;

      parallel_inverter_sync #(.N_INV(N)) dut (
        .clk(clk), .rst_n(rst_n), .i_meas(i_meas), .pwm_out(pwm), .above_ub(up),
        .below_lb(lo), .resync(rs), .timeout(to), .reset_ignored(ig)
      );
      inverter_bench_harness #(.N(N), .LB(LB_TAB[s]), .UB(UB_TAB[s]), .CLOCK_MODE(mode)) h (
        .clk(clk), .rst_n(rst_n), .i_meas(i_meas), .pwm_out(pwm), .above_ub(up),
        .below_lb(lo), .resync(rs), .timeout(to), .reset_ignored(ig),
        .hold_samples(hold), .measuring(measuring)
      );

      initial begin
        real f;
        wait (done);
        f = h.f_pwm_khz();
        $display("N=%0d %s: f_PWM %0.3f kHz (reference %0.3f), line current %0.3f..%0.3f A, RMS circulating %0.3e A",
                 N, mode == 0 ? "lock-step" : "skewed   ", f, F_TAB[s], h.i_min, h.i_max, h.circ_rms());
        checks += h.checks;
        failures += h.failures;
        if (mode == 0) begin
          checks += 2;
          if (!(f > F_TAB[s] * 0.99 && f < F_TAB[s] * 1.01)) begin
            failures++;
            $display("FAIL N=%0d PWM frequency", N);
          end
          if (!(h.i_min > LB_TAB[s] / 1000.0 - 0.1 && h.i_max < UB_TAB[s] / 1000.0 + 0.1)) begin
            failures++;
            $display("FAIL N=%0d line currents outside the window", N);
          end
        end
      end
    end
  end

  initial begin
    #100000.0;
    measuring = 1'b1;
    #200000.0;
    measuring = 1'b0;
    done = 1'b1;
    #1.0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #600000.0;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
