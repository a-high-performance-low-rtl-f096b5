`timescale 1ps/10fs
// csa_stage: one logic stage of the mesochronous multiplier, the adder
// layers LO..HI-1 of the carry-save array chained with no register between
// them.
//
// In the mesochronous scheme a stage holds several data sets at once: a new
// operand set enters before the previous one has left, the sets kept apart
// only by the delays of the gates. Logically the stage is just the layers in
// series. The state vector is packed as {x, y, s, c} (6*M bits, dual rail).
//
// Ports: d_t/d_f in, q_t/q_f out, 6*M bits each. Purely combinational.
module csa_stage #(
  parameter int unsigned M  = 8,
  parameter int unsigned LO = 0,
  parameter int unsigned HI = 4
) (
  input  logic [6*M-1:0] d_t, d_f,
  output logic [6*M-1:0] q_t, q_f
);
  localparam int unsigned SW = 6*M;
  localparam int unsigned NL = HI - LO;

  logic [SW-1:0] v_t [NL+1];
  logic [SW-1:0] v_f [NL+1];

  assign v_t[0] = d_t;
  assign v_f[0] = d_f;

  for (genvar l = 0; l < NL; l++) begin : g_layer
    csa_layer #(.M(M), .LAYER(LO + l)) u_layer (
      .xi_t(v_t[l][6*M-1:5*M]), .xi_f(v_f[l][6*M-1:5*M]),
      .yi_t(v_t[l][5*M-1:4*M]), .yi_f(v_f[l][5*M-1:4*M]),
      .si_t(v_t[l][4*M-1:2*M]), .si_f(v_f[l][4*M-1:2*M]),
      .ci_t(v_t[l][2*M-1:0]),   .ci_f(v_f[l][2*M-1:0]),
      .xo_t(v_t[l+1][6*M-1:5*M]), .xo_f(v_f[l+1][6*M-1:5*M]),
      .yo_t(v_t[l+1][5*M-1:4*M]), .yo_f(v_f[l+1][5*M-1:4*M]),
      .so_t(v_t[l+1][4*M-1:2*M]), .so_f(v_f[l+1][4*M-1:2*M]),
      .co_t(v_t[l+1][2*M-1:0]),   .co_f(v_f[l+1][2*M-1:0]));
  end

  assign q_t = v_t[NL];
  assign q_f = v_f[NL];
endmodule
