`timescale 1ps/10fs
// mpp_clock_path: behavioural model of the linear clock path of a
// mesochronous pipeline. Not synthesizable (it is built from delay elements).
//
// The clock enters beside register rank 0 and runs alongside the data path:
// clk_rank[0] is the input clock, and between rank i and rank i+1 sits the
// delay element of stage i, so clk_rank[i+1] is clk_rank[i] delayed by
// delta(i). There is no clock tree: each rank has one driver and the ranks
// switch one after the other, not all at once. clk_out is the clock leaving
// the last rank.
//
// When TUNABLE is set, each stage's fixed element is followed by a digitally
// variable element trimmed by ctl[i] = {C1, C2, C3}, so the path can be
// retuned after delay variations (this adds 96..140 ps per stage).
// Parameters: K stages, DELTA_PS[i] the fixed part of delta(i), N[i] the
// whole periods the data of stage i spends in flight (bookkeeping only).
// Default delta = 35 ps, N = 4 per stage is this design's estimate for the
// 8x8 multiplier at 350 ps (Delta_S = 4 * 280 + 295 + 10 + 10 = 1435 ps
// = 4 * 350 + 35 for four full-adder layers per stage).
module mpp_clock_path #(
  parameter int unsigned K            = 4,
  parameter real         DELTA_PS [K] = '{default: 35.0},
  parameter int unsigned N        [K] = '{default: 4},
  parameter bit          TUNABLE      = 1'b0
) (
  input  logic           clk_in,
  input  logic [K-1:0][2:0] ctl,
  output logic [K:0]     clk_rank,
  output logic           clk_out
);
  assign clk_rank[0] = clk_in;

  for (genvar i = 0; i < K; i++) begin : g_stage
    logic clk_fix;
    clk_delay_element #(.DELTA_PS(DELTA_PS[i]), .N(N[i])) u_fix (
      .clk_in(clk_rank[i]), .clk_out(clk_fix));
    if (TUNABLE) begin : g_var
      var_delay_element u_var (
        .c1(ctl[i][2]), .c2(ctl[i][1]), .c3(ctl[i][0]),
        .clk_in(clk_fix), .clk_out(clk_rank[i+1]));
    end else begin : g_fixed
      assign clk_rank[i+1] = clk_fix;
    end
  end

  assign clk_out = clk_rank[K];
endmodule
