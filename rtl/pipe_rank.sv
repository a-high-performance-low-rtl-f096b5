`timescale 1ps/10fs
// pipe_rank: one register rank of the mesochronous pipeline.
//
// W differential flip-flops share the rank's own clock. In the mesochronous
// scheme every rank has its own clock, a delayed copy of the clock that
// arrived at the previous rank, so ranks are not triggered together.
// Sampling all bits on one edge removes the spread in arrival times that the
// data picked up in the logic stage before it.
//
// FF selects the cell: FF_SAFF (default, the sense-amplifier flip-flop of the
// 8x8 multiplier, one differential cell per bit) or FF_DYN (the dynamic
// two-phase D flip-flop, single ended, one cell per rail).
// Ports: clk (rank clock), d_t/d_f (true/complement rails) in, q_t/q_f out.
// Timing: captures on the rising edge of clk.
module pipe_rank
  import mpp_pkg::*;
#(
  parameter int unsigned W  = 8,
  parameter ff_kind_e    FF = FF_SAFF
) (
  input  logic         clk,
  input  logic [W-1:0] d_t, d_f,
  output logic [W-1:0] q_t, q_f
);
  for (genvar i = 0; i < W; i++) begin : g_ff
    if (FF == FF_SAFF) begin : g_saff
      saff u_ff (.clk(clk), .d(d_t[i]), .d_n(d_f[i]), .q(q_t[i]), .q_n(q_f[i]));
    end else begin : g_dyn
      dyn_dff u_ff_t (.clk_reg(clk), .d(d_t[i]), .q(q_t[i]));
      dyn_dff u_ff_f (.clk_reg(clk), .d(d_f[i]), .q(q_f[i]));
    end
  end
endmodule
