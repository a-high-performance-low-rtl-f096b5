`timescale 1ps/10fs
// jk_ff: JK flip-flop with asynchronous reset, the cell of the clock
// divider chain. J=K=1 toggles, J=1 sets, K=1 clears, J=K=0 holds, on the
// rising edge of clk. rst (active high, asynchronous) clears q; the reset
// is this design's addition so the divider starts in a known state.
module jk_ff (
  input  logic clk,
  input  logic rst,
  input  logic j, k,
  output logic q, q_n
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst)               q <= 1'b0;
    else unique case ({j, k})
      2'b00: q <= q;
      2'b01: q <= 1'b0;
      2'b10: q <= 1'b1;
      2'b11: q <= ~q;
    endcase
  end
  assign q_n = ~q;
endmodule
