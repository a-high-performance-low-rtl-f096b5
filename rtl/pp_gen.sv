`timescale 1ps/10fs
// pp_gen: differential partial-product generator for one row of the array.
//
// Row k of an M x M product is x AND y[k], shifted left by k places. On the
// true rail this is a row of AND gates; on the complementary rail the same
// gates become OR gates of the complements (x_n | y_n[k]). Each row is
// generated right where its full-adder layer needs it, with x and y carried
// along the array, as in the 4x4 test-chip schematic.
//
// Ports: x/y true and complement rails in; pp_t/pp_f (2*M bits, already
// shifted) out. Purely combinational.
module pp_gen #(
  parameter int unsigned M   = 8,
  parameter int unsigned ROW = 0
) (
  input  logic [M-1:0]   x_t, x_f,
  input  logic           yk_t, yk_f,
  output logic [2*M-1:0] pp_t, pp_f
);
  always_comb begin
    pp_t = '0;
    pp_f = '1;
    for (int unsigned i = 0; i < M; i++) begin
      pp_t[i+ROW] = x_t[i] & yk_t;
      pp_f[i+ROW] = x_f[i] | yk_f;
    end
  end
endmodule
