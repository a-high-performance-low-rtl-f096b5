`timescale 1ps/10fs
// saff: sense-amplifier based flip-flop, modelled at the logic level.
//
// A differential positive-edge D flip-flop: on the rising clock edge the
// sense-amplifier front end resolves the pair (d, d_n) and the output latch
// drives q and q_n together. When the input pair is not complementary the
// sense amplifier has nothing to resolve; this model then keeps its previous
// state (own choice; the transistor circuit's behaviour there is not
// specified). There is no reset, as in the transistor cell.
//
// Ports: clk, d, d_n in; q, q_n out. Timing: one rising-edge register.
module saff (
  input  logic clk,
  input  logic d, d_n,
  output logic q, q_n
);
  always_ff @(posedge clk) begin
    if (d != d_n) begin
      q   <= d;
      q_n <= d_n;
    end
  end
endmodule
