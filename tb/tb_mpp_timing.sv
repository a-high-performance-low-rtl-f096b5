`timescale 1ps/10fs
// tb_mpp_timing: the clock-period budget of the mesochronous scheme, worked
// through the package's budget functions and held against the defaults the
// RTL is built with.
//   * 8x8 with the sense-amplifier flop: a 350 ps clock leaves 190 ps of
//     stage delay difference; the conventional one-layer-per-stage pipeline
//     needs 595 ps, a speed-up of 1.7.
//   * 3-stage variant with the dynamic flop: a 500 ps clock leaves 400 ps,
//     room for five adder layers of 70 ps spread; its conventional
//     pipeline needs 475 ps.
//   * 8x8 clock path: four adder layers per stage need 1435 ps of clock
//     delay = 4 periods + 35 ps, which must be the default N and DELTA_PS
//     of mpp_clock_path; that edge meets setup, and meets hold when the
//     stage's fastest path is within 190 ps of its slowest.
//   * 4x4 test chip: stage delays 2.85 ns and 3.3 ns at a 1.95 ns clock give
//     N = 1 and 900 / 1350 ps, the tiny_chip defaults; the as-fabricated
//     chip (3.97 ns clock, 5.84 / 6.76 ns stages) gives 1870 / 2790 ps.
//   * random design points: splitting the clock delay into N periods plus
//     a remainder always meets setup with no slack, and hold is met exactly
//     when the period is at least the delay-difference bound.
module tb_mpp_timing;
  import mpp_pkg::*;
  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // default-parameter instances, read for their parameters only
  logic clk_in = 1'b0;
  logic [3:0][2:0] ctl = '0;
  logic [4:0] clk_rank;
  logic clk_out;
  mpp_clock_path u_path (.clk_in(clk_in), .ctl(ctl), .clk_rank(clk_rank), .clk_out(clk_out));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic chk_eq(input int unsigned got, input int unsigned exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int unsigned d, n, dl, dmax, dmin, dr, ts, th, dc, t, tmin;
    // ------------------------------------------------ 8x8, sense-amp flop
    chk_eq(DDIFF_MAX_PS, 190, "stage delay difference allowed at 350 ps");
    chk_eq(t_clk_min(DDIFF_MAX_PS, SAFF_TS_PS, SAFF_TH_PS, DCLK_PS), T_CLK_MPP_PS, "period from 190 ps spread");
    chk(SAFF_TMIN_PS <= T_CLK_MPP_PS, "flop minimum period within target");
    d = stage_clk_delay(FA_DMAX_PS, SAFF_DR_PS, SAFF_TS_PS, DCLK_PS);
    chk_eq(d, 595, "conventional pipeline period, one layer per stage");
    chk_eq((10*d) / T_CLK_MPP_PS, 17, "speed-up x10");
    // ------------------------------------------------ dynamic-flop variant
    chk_eq(t_clk_min(400, DYN_TS_PS, DYN_TH_PS, DCLK_DYN_PS), 500, "period from 400 ps spread");
    chk_eq(400 / (FA_DMAX_PS - FA_DMIN_PS), 5, "adder layers per stage at 500 ps");
    chk_eq(stage_clk_delay(FA_DMAX_PS, DYN_DR_PS, DYN_TS_PS, 0), 475, "conventional period with the dynamic flop");
    // ------------------------------------------------ 8x8 clock path
    d = stage_clk_delay(4*FA_DMAX_PS, SAFF_DR_PS, SAFF_TS_PS, DCLK_PS);
    chk_eq(d, 1435, "clock delay of a 4-layer stage");
    n  = whole_periods(d, T_CLK_MPP_PS);
    dl = remainder_delay(d, T_CLK_MPP_PS);
    chk_eq(n, 4, "whole periods of the 4-layer stage");
    chk_eq(dl, 35, "remainder of the 4-layer stage");
    for (int i = 0; i < 4; i++) begin
      chk_eq(u_path.N[i], n, "mpp_clock_path default N");
      chk_eq(int'(u_path.DELTA_PS[i]), dl, "mpp_clock_path default DELTA_PS");
    end
    chk(setup_ok(4*FA_DMAX_PS, SAFF_DR_PS, SAFF_TS_PS, DCLK_PS, n, T_CLK_MPP_PS, dl), "setup, 4-layer stage");
    chk(!setup_ok(4*FA_DMAX_PS, SAFF_DR_PS, SAFF_TS_PS, DCLK_PS, n - 1, T_CLK_MPP_PS, dl), "one period early misses setup");
    chk(hold_ok(4*FA_DMAX_PS - DDIFF_MAX_PS, SAFF_DR_PS, SAFF_TH_PS, DCLK_PS, n, T_CLK_MPP_PS, dl),
        "hold, stage spread 190 ps");
    chk(!hold_ok(4*FA_DMIN_PS, SAFF_DR_PS, SAFF_TH_PS, DCLK_PS, n, T_CLK_MPP_PS, dl),
        "hold fails if four layers' spread (280 ps) added up");
    // ------------------------------------------------ 4x4 test chip
    chk_eq(whole_periods(2850, 1950), 1, "test chip stage 1 periods");
    chk_eq(remainder_delay(2850, 1950), 900, "test chip stage 1 remainder");
    chk_eq(whole_periods(3300, 1950), 1, "test chip stage 2 periods");
    chk_eq(remainder_delay(3300, 1950), 1350, "test chip stage 2 remainder");
    chk_eq(remainder_delay(5840, 3970), 1870, "fabricated chip stage 1 remainder");
    chk_eq(remainder_delay(6760, 3970), 2790, "fabricated chip stage 2 remainder");
    // ------------------------------------------------ random design points
    for (int i = 0; i < 2000; i++) begin
      dmax = 200 + $urandom_range(0, 3000);
      dmin = dmax - $urandom_range(0, dmax - 100);
      dr   = $urandom_range(50, 400);
      ts   = $urandom_range(0, 100);
      th   = $urandom_range(0, 150);
      dc   = $urandom_range(0, 30);
      t    = $urandom_range(100, 3000);
      d    = stage_clk_delay(dmax, dr, ts, dc);
      n    = whole_periods(d, t);
      dl   = remainder_delay(d, t);
      chk(n*t + dl == d && dl < t, "split into periods and remainder");
      chk(setup_ok(dmax, dr, ts, dc, n, t, dl), "split meets setup");
      if (dl > 0) chk(!setup_ok(dmax, dr, ts, dc, n, t, dl - 1), "setup has no slack");
      tmin = t_clk_min(dmax - dmin, ts, th, dc);
      chk(hold_ok(dmin, dr, th, dc, n, t, dl) == (t >= tmin), "hold met exactly when period >= bound");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
