`timescale 1ps/10fs
// mpp_top: the two mesochronous multipliers of the design side by side.
//
// 1. The 8x8-bit carry-save multiplier in the mesochronous scheme: 16 adder
//    layers in 4 logic stages between 5 register ranks (mpp_multiplier),
//    clocked through a linear clock path beside the data path
//    (mpp_clock_path) instead of a clock tree. Each stage of the clock path
//    is a fixed delay element followed by a digitally variable one, trimmed
//    by dly_ctl[i] = {C1, C2, C3} so the clock path can be retuned if the
//    stage delays drift. Target clock: 350 ps (2.86 GHz) in 180 nm.
//    Ports m8_*: clk_in, x, y in; p, p_n, clk_out out. The product of the
//    operands captured on one clk_in edge leaves rank 4 on the clk_out edge
//    that travelled with them.
// 2. The 4x4-bit test chip (tiny_chip), ports t_*, with its own ring
//    oscillator, clock divider and slow input / output banks.
module mpp_top
  import mpp_pkg::*;
#(
  parameter int unsigned M8 = 8,
  parameter int unsigned K8 = 4,
  parameter int unsigned T_DEPTH = 16,
  localparam int unsigned TAW = $clog2(T_DEPTH)
) (
  // 8x8 multiplier
  input  logic              m8_clk_in,
  input  logic [K8-1:0][2:0] m8_dly_ctl,
  input  logic [M8-1:0]     m8_x, m8_y,
  output logic [2*M8-1:0]   m8_p, m8_p_n,
  output logic              m8_clk_out,
  // 4x4 test chip
  input  logic              t_rst,
  input  logic              t_s1, t_s0,
  input  logic              t_wr_clk,
  input  logic              t_wr_en,
  input  logic [TAW-1:0]    t_wr_addr,
  input  logic [3:0]        t_wr_x, t_wr_y,
  input  logic              t_run,
  output logic              t_busy,
  input  logic [TAW-1:0]    t_rd_addr,
  output logic [7:0]        t_rd_prod,
  output logic              t_clk_mon,
  output logic              t_clk_sys
);
  logic [K8:0] m8_clk_rank;

  mpp_clock_path #(.K(K8), .DELTA_PS('{default: 0.0}), .N('{default: 4}), .TUNABLE(1'b1)) u_m8_cpath (
    .clk_in(m8_clk_in), .ctl(m8_dly_ctl), .clk_rank(m8_clk_rank), .clk_out(m8_clk_out));

  mpp_multiplier #(.M(M8), .K(K8), .FF(FF_SAFF)) u_m8 (
    .clk_rank(m8_clk_rank), .x(m8_x), .y(m8_y), .p(m8_p), .p_n(m8_p_n));

  tiny_chip #(.DEPTH(T_DEPTH)) u_tiny (
    .rst(t_rst), .s1(t_s1), .s0(t_s0),
    .wr_clk(t_wr_clk), .wr_en(t_wr_en), .wr_addr(t_wr_addr), .wr_x(t_wr_x), .wr_y(t_wr_y),
    .run(t_run), .busy(t_busy), .rd_addr(t_rd_addr), .rd_prod(t_rd_prod),
    .clk_mon(t_clk_mon), .clk_sys(t_clk_sys));
endmodule
