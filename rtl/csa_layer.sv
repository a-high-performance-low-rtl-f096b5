`timescale 1ps/10fs
// csa_layer: one layer of adders of the carry-save array multiplier.
//
// The array state between layers is the operand pair (x, y), carried along,
// and a sum vector s and a carry vector c, each 2*M bits; s + c is the
// running total. Layers 0..M-1 are full-adder layers: layer k adds partial
// product row k (x AND y[k], shifted by k) into (s, c), one full adder per
// bit, with the carries moved up one place. Layers M..2M-1 are the merging
// layers: the same cells with carry-in 0, i.e. half adders, which move the
// remaining carries up one place per layer. After all 2*M layers c is zero
// and s is the product (holds for every M; the carry chain left after the
// full-adder layers is at most M places long).
//
// All signals are dual rail (_t true, _f complement).
// Ports: x/y (M bits), s/c (2*M bits) in and out. Purely combinational.
module csa_layer #(
  parameter int unsigned M     = 8,
  parameter int unsigned LAYER = 0
) (
  input  logic [M-1:0]   xi_t, xi_f, yi_t, yi_f,
  input  logic [2*M-1:0] si_t, si_f, ci_t, ci_f,
  output logic [M-1:0]   xo_t, xo_f, yo_t, yo_f,
  output logic [2*M-1:0] so_t, so_f, co_t, co_f
);
  logic [2*M-1:0] add_t, add_f;   // third operand of each cell
  logic [2*M-1:0] cy_t, cy_f;     // cell carries before the shift

  if (LAYER < M) begin : g_fa
    pp_gen #(.M(M), .ROW(LAYER)) u_pp (
      .x_t(xi_t), .x_f(xi_f), .yk_t(yi_t[LAYER]), .yk_f(yi_f[LAYER]),
      .pp_t(add_t), .pp_f(add_f));
  end else begin : g_ha
    assign add_t = '0;
    assign add_f = '1;
  end

  for (genvar i = 0; i < 2*M; i++) begin : g_cell
    full_adder u_fa (
      .a(si_t[i]),  .a_n(si_f[i]),
      .b(ci_t[i]),  .b_n(ci_f[i]),
      .ci(add_t[i]), .ci_n(add_f[i]),
      .s(so_t[i]),  .s_n(so_f[i]),
      .co(cy_t[i]), .co_n(cy_f[i]));
  end

  // Carries move one place up; the carry out of the top bit is always 0
  // because s + c never exceeds the product.
  assign co_t = {cy_t[2*M-2:0], 1'b0};
  assign co_f = {cy_f[2*M-2:0], 1'b1};

  assign xo_t = xi_t;
  assign xo_f = xi_f;
  assign yo_t = yi_t;
  assign yo_f = yi_f;
endmodule
