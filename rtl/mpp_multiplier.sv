`timescale 1ps/10fs
// mpp_multiplier: M x M carry-save-adder multiplier pipelined in the
// mesochronous scheme.
//
// The 2*M adder layers of the array (M full-adder layers, then M half-adder
// merging layers, see csa_layer) are cut into K logic stages by K+1 register
// ranks. Rank 0 registers the operands, rank K the product. Unlike a
// conventional pipeline the ranks do not share one clock edge: rank r is
// clocked by clk_rank[r], a copy of the input clock delayed along a clock
// path that runs beside the data path (mpp_clock_path). The delay to rank
// r+1 matches the flight time of the data through stage r, which may be
// several clock periods, so each stage holds several operand sets at once
// and the clock period is bounded by the spread (dmax - dmin) of a stage
// rather than by its full delay.
//
// Defaults follow the 8x8 multiplier of the design: M = 8, 4 logic stages,
// 5 register ranks. Where the ranks sit inside the 16 layers is this
// design's own choice: the layers are split evenly, 4 per stage.
// All ranks carry the full dual-rail state {x, y, s, c}; bits a later
// stage no longer reads are left for synthesis to remove.
//
// FF chooses the register cell of the ranks (see pipe_rank). The 3-stage,
// 4-rank variant with the dynamic two-phase flop is K = 3, FF = FF_DYN
// (layers split 5 + 5 + 6); the 4x4 test chip uses M = 4, K = 2.
// Ports: clk_rank[K:0] (one clock per rank), x, y (M bits, single rail; the
// complement rails are made at the input), p / p_n (2*M bits, product and
// its complement rail, from rank K).
// Timing: an operand pair captured by rank 0 on an edge is captured by rank
// r on the edge of clk_rank[r] that has travelled with it; in a simulation
// without gate delays and with rank clocks all in phase the latency is K
// clock periods, one product leaves per period.
// No reset: the ranks hold whatever they last captured.
module mpp_multiplier #(
  parameter int unsigned M = 8,
  parameter int unsigned K = 4,
  parameter mpp_pkg::ff_kind_e FF = mpp_pkg::FF_SAFF
) (
  input  logic [K:0]     clk_rank,
  input  logic [M-1:0]   x, y,
  output logic [2*M-1:0] p, p_n
);
  import mpp_pkg::*;

  localparam int unsigned SW = 6*M;
  localparam int unsigned L  = n_layers(M);

  // d: rank inputs, q: rank outputs
  logic [SW-1:0] d_t [K+1];
  logic [SW-1:0] d_f [K+1];
  logic [SW-1:0] q_t [K+1];
  logic [SW-1:0] q_f [K+1];

  // Rank 0 input: operands, empty sum and carry vectors.
  assign d_t[0] = {x,  y,  {(4*M){1'b0}}};
  assign d_f[0] = {~x, ~y, {(4*M){1'b1}}};

  for (genvar r = 0; r <= K; r++) begin : g_rank
    pipe_rank #(.W(SW), .FF(FF)) u_rank (
      .clk(clk_rank[r]), .d_t(d_t[r]), .d_f(d_f[r]), .q_t(q_t[r]), .q_f(q_f[r]));
  end

  for (genvar g = 0; g < K; g++) begin : g_stage
    csa_stage #(.M(M), .LO(rank_layer(g, L, K)), .HI(rank_layer(g+1, L, K))) u_stage (
      .d_t(q_t[g]), .d_f(q_f[g]), .q_t(d_t[g+1]), .q_f(d_f[g+1]));
  end

  assign p   = q_t[K][4*M-1:2*M];
  assign p_n = q_f[K][4*M-1:2*M];

  initial begin
    assert (K >= 1 && K <= L) else $error("K must lie in 1..2*M");
  end
endmodule
