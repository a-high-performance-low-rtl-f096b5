`timescale 1ps/10fs
// dyn_dff: dynamic two-phase D flip-flop with its local clock buffer.
//
// Two transmission-gate latches in series, each followed by an inverter,
// with the charge on the node after each gate holding the value. A local
// buffer turns the rank clock ClkReg into Clk (two inverters) and Clk_n (an
// always-on transmission gate, matching one inverter's delay, then an
// inverter), so both phases switch together. The master gate conducts while
// Clk is low, the slave gate while Clk is high, so Q takes the value D had
// at the rising edge of ClkReg: a positive-edge flip-flop, non-inverting
// (two inversions from D to Q).
//
// Written here as two level-sensitive latches (master open on Clk low,
// slave open on Clk high); the latch warnings a linter gives for this file
// are the intended storage nodes. The dynamic nodes leak in silicon; that
// sets a lowest clock frequency which this logic model does not have.
// Ports: clk_reg, d in; q out.
module dyn_dff (
  input  logic clk_reg,
  input  logic d,
  output logic q
);
  logic clk, clk_n;   // local two-phase clock
  logic m_n;          // master storage node after the first inverter

  assign clk   = clk_reg;
  assign clk_n = ~clk_reg;

  always_latch begin
    if (clk_n) m_n = ~d;
  end

  always_latch begin
    if (clk) q = ~m_n;
  end
endmodule
