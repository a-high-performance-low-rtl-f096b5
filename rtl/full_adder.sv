`timescale 1ps/10fs
// full_adder: differential 1-bit full adder, the basic cell of the
// carry-save array.
//
// Every signal comes as a true rail and a complementary rail. Each output
// rail is computed only from the rails of the same polarity: the sum is the
// three-input XOR, the carry the three-input majority, and since both
// functions are self-dual the complementary outputs are the same functions of
// the complementary inputs. Sum and carry are produced together, as the
// transmission-gate cell does. A half adder is this cell with carry-in tied
// to 0 (ci = 0, ci_n = 1).
//
// Ports: a/b/ci with their _n rails in; s, co with their _n rails out.
// Timing: purely combinational (the cell the design characterised has
// 210..280 ps of delay at 180 nm; that is not modelled here).
module full_adder (
  input  logic a,  a_n,
  input  logic b,  b_n,
  input  logic ci, ci_n,
  output logic s,  s_n,
  output logic co, co_n
);
  always_comb begin
    s    = a ^ b ^ ci;
    co   = (a & b) | (a & ci) | (b & ci);
    s_n  = a_n ^ b_n ^ ci_n;
    co_n = (a_n & b_n) | (a_n & ci_n) | (b_n & ci_n);
  end
endmodule
