`timescale 1ps/10fs
// mpp_pkg: constants shared by the mesochronous multiplier blocks.
//
// Timing figures are the characterisation numbers of the cells the design
// was built around (180 nm process, picoseconds). They are not used by the
// logic itself; testbenches and clock-path models use them to place clock
// edges and to evaluate the clock-period bounds of the scheme:
//   Tclk >= dmax(j) - dmin(j) + ts + th + 2*dclk            (one stage j)
//   Delta_S(i) = dmax(i) + DR + ts + dclk = N(i)*Tclk + delta(i)
// The budget functions below evaluate these relations (and the two-sided
// window that applies when a clock edge arrives N(i) >= 1 periods late) on
// integer picoseconds, so that a design point can be checked at
// elaboration or in a testbench. The conventional-pipeline bound
//   Tclk_cpp >= Dmax + DR + ts + dclk
// is the same expression as Delta_S with one layer per stage.
// The layer helpers describe the carry-save array: M full-adder layers that
// reduce the M partial products to a sum and a carry vector, followed by M
// half-adder layers that merge the two vectors, 2*M layers in all.
package mpp_pkg;

  // Full adder (Table of full-adder delays, 180 nm)
  localparam int unsigned FA_DMAX_PS    = 280;
  localparam int unsigned FA_DMIN_PS    = 210;
  localparam int unsigned FA_RATE_PS    = 175;  // fastest input rate of the FA
  // Sense-amplifier flip-flop
  localparam int unsigned SAFF_TS_PS    = 10;
  localparam int unsigned SAFF_TH_PS    = 130;
  localparam int unsigned SAFF_DR_PS    = 295;
  localparam int unsigned SAFF_TMIN_PS  = 320;  // minimum clock period of the flop
  // Clock uncertainty allowed per edge (2*dclk = 20 ps in the budget)
  localparam int unsigned DCLK_PS       = 10;
  // Target mesochronous clock period (2.86 GHz)
  localparam int unsigned T_CLK_MPP_PS  = 350;
  // Largest delay difference a stage may have at T_CLK_MPP_PS
  localparam int unsigned DDIFF_MAX_PS  = T_CLK_MPP_PS - (SAFF_TS_PS + SAFF_TH_PS + 2*DCLK_PS);

  // Dynamic two-phase D flip-flop (the variant's register cell)
  localparam int unsigned DYN_TS_PS     = 65;
  localparam int unsigned DYN_TH_PS     = 5;
  localparam int unsigned DYN_DR_PS     = 130;
  // Clock uncertainty of the dynamic-flop budget: its 500 ps clock leaves
  // 400 ps of stage delay difference, so ts + th + 2*dclk = 100 ps.
  localparam int unsigned DCLK_DYN_PS   = 15;

  // Flip-flop cell used in a register rank: the sense-amplifier flip-flop
  // of the 180 nm multiplier, or the dynamic two-phase D flip-flop of the
  // 90 nm / low-power variants.
  typedef enum logic [0:0] {FF_SAFF = 1'b0, FF_DYN = 1'b1} ff_kind_e;

  // Number of adder layers of an M x M carry-save array multiplier.
  function automatic int unsigned n_layers(input int unsigned m);
    return 2*m;
  endfunction

  // Layer at which register rank r sits when L layers are split into K
  // stages as evenly as possible (rank 0 = inputs, rank K = outputs).
  function automatic int unsigned rank_layer(input int unsigned r,
                                             input int unsigned l,
                                             input int unsigned k);
    return (r*l)/k;
  endfunction

  // ---------------------------------------------------------- budget
  // Shortest clock period a stage with delay difference ddiff allows.
  function automatic int unsigned t_clk_min(input int unsigned ddiff, input int unsigned ts,
                                            input int unsigned th, input int unsigned dclk);
    return ddiff + ts + th + 2*dclk;
  endfunction

  // Clock-path delay a stage needs: the latest moment its data may be
  // captured, measured from the edge that launched it.
  function automatic int unsigned stage_clk_delay(input int unsigned dmax, input int unsigned dr,
                                                  input int unsigned ts, input int unsigned dclk);
    return dmax + dr + ts + dclk;
  endfunction

  // Whole periods and remainder of a clock-path delay: delay = n*t + delta.
  function automatic int unsigned whole_periods(input int unsigned delay, input int unsigned t);
    return delay / t;
  endfunction
  function automatic int unsigned remainder_delay(input int unsigned delay, input int unsigned t);
    return delay % t;
  endfunction

  // Setup side: the data of the launching edge has settled before the edge
  // that arrives n*t + delta later captures it.
  function automatic bit setup_ok(input int unsigned dmax, input int unsigned dr,
                                  input int unsigned ts, input int unsigned dclk,
                                  input int unsigned n, input int unsigned t,
                                  input int unsigned delta);
    return dmax + dr + ts + dclk <= n*t + delta;
  endfunction

  // Hold side: the next data set (launched one period later) does not
  // reach the register before the capturing edge's hold time has passed.
  function automatic bit hold_ok(input int unsigned dmin, input int unsigned dr,
                                 input int unsigned th, input int unsigned dclk,
                                 input int unsigned n, input int unsigned t,
                                 input int unsigned delta);
    return t + dmin + dr >= th + dclk + n*t + delta;
  endfunction

endpackage
