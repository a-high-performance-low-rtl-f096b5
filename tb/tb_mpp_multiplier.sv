`timescale 1ps/10fs
// tb_mpp_multiplier: functional and cycle check of the mesochronous
// carry-save multiplier.
//
// Three instances:
//   u8  : 8x8, 4 stages, 5 ranks (defaults), all ranks on one clock: a new
//         operand pair every clock, product K = 4 clocks after capture;
//         corner cases plus random pairs.
//   u4  : 4x4, 2 stages (the test-chip configuration), exhaustive, one
//         clock: latency 2.
//   u3  : 8x8 in 3 stages and 4 ranks built from the dynamic two-phase
//         flop (the 3-stage variant), one clock: latency 3.
//   u8s : 8x8 whose rank clocks trail one another by 60 ps each, as the
//         clock path delivers them; with no gate delays in the model the
//         operands captured on an input edge leave the last rank on the
//         output clock edge that travelled with them (same edge count).
// Expected products come from the simulator's own multiplication; the
// complement rail must equal the inverted product.
module tb_mpp_multiplier;
  import mpp_pkg::*;
  localparam int unsigned T = T_CLK_MPP_PS;
  logic clk = 1'b0;
  always #(T/2) clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- 8x8
  logic [7:0]  x8, y8;
  logic [15:0] p8, p8_n;
  mpp_multiplier u8 (.clk_rank({5{clk}}), .x(x8), .y(y8), .p(p8), .p_n(p8_n));

  // ---------------------------------------------------------------- 4x4
  logic [3:0] x4, y4;
  logic [7:0] p4, p4_n;
  mpp_multiplier #(.M(4), .K(2)) u4 (.clk_rank({3{clk}}), .x(x4), .y(y4), .p(p4), .p_n(p4_n));

  // ------------------------------------------ 8x8, 3 stages, dynamic flop
  logic [15:0] p3, p3_n;
  mpp_multiplier #(.M(8), .K(3), .FF(FF_DYN)) u3 (.clk_rank({4{clk}}), .x(x8), .y(y8), .p(p3), .p_n(p3_n));

  // ------------------------------------------------- 8x8, skewed clocks
  logic [4:0]  clk_s;
  logic [7:0]  xs, ys;
  logic [15:0] ps, ps_n;
  assign clk_s[0] = clk;
  for (genvar r = 1; r <= 4; r++) begin : g_skew
    assign #(60) clk_s[r] = clk_s[r-1];
  end
  mpp_multiplier u8s (.clk_rank(clk_s), .x(xs), .y(ys), .p(ps), .p_n(ps_n));

  // operand history, indexed by the clock edge that captured them
  logic [15:0] exp8 [$];
  logic [7:0]  exp4 [$];
  logic [15:0] exps [$];
  int edge_in = 0;

  task automatic chk(input logic [31:0] got, input logic [31:0] got_n_inv,
                     input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp || got_n_inv !== exp) begin
      failures++;
      $display("FAIL %s: got %0d (complement rail gives %0d) expected %0d", what, got, got_n_inv, exp);
    end
  endtask

  // drive at the falling edge, record what the next rising edge captures
  int n = 0;
  initial begin
    x8 = 0; y8 = 0; x4 = 0; y4 = 0; xs = 0; ys = 0;
    forever begin
      @(negedge clk);
      if (n < 16)       begin x8 = (n[0]) ? 8'hFF : 8'h00; y8 = (n[1]) ? 8'hFF : 8'h80; end
      else if (n < 20)  begin x8 = 8'hFF; y8 = 8'hFF; end
      else              begin x8 = 8'($urandom); y8 = 8'($urandom); end
      x4 = n[3:0]; y4 = n[7:4];
      xs = 8'($urandom); ys = 8'($urandom);
      exp8.push_back(16'(x8) * 16'(y8));
      exp4.push_back(8'(x4) * 8'(y4));
      exps.push_back(16'(xs) * 16'(ys));
      n++;
    end
  end

  // single-clock instances: product of edge e is visible after edge e+K
  int e = -2;   // the first rising edge comes before the first operands
  always @(posedge clk) begin
    e++;
    #1;
    if (e >= 4 && e - 4 < exp8.size()) chk(32'(p8), {16'h0, ~p8_n}, 32'(exp8[e-4]), "8x8 latency 4");
    if (e >= 3 && e - 3 < exp8.size()) chk(32'(p3), {16'h0, ~p3_n}, 32'(exp8[e-3]), "8x8 3-stage latency 3");
    if (e >= 2 && e - 2 < exp4.size()) chk(32'(p4), {24'h0, ~p4_n}, 32'(exp4[e-2]), "4x4 latency 2");
  end

  // skewed instance: k-th edge of the last rank clock carries edge k's data
  int k = -2;
  always @(posedge clk_s[4]) begin
    // the delayed nets start at random values: ignore a spurious edge at start-up
    if ($time > 5*60) k++;
    #1;
    if ($time > 5*60 && k >= 0 && k < exps.size()) chk(32'(ps), {16'h0, ~ps_n}, 32'(exps[k]), "8x8 skewed ranks, same edge");
  end

  initial begin
    wait (n >= 2100);
    @(posedge clk); #5;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
