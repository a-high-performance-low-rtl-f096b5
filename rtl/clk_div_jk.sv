`timescale 1ps/10fs
// clk_div_jk: ripple divider that slows the test chip's internal clock down
// by 2^N so it can be watched on a pin (N = 18 on the chip: a 1.95 ns
// internal period shows as 511.2 us outside).
//
// A chain of N JK flip-flops with J = K = 1, each toggling. Stage 0 is
// clocked by clk_in, stage i by the complement output of stage i-1, i.e. on
// the falling edge of stage i-1's output, which makes the chain a binary
// ripple counter; stage N-1 is the slow clock. The taps q[N-1:0] are the
// counter value.
// Ports: clk_in, rst (asynchronous, active high, own addition) in;
// clk_out, q out. Timing: clk_out period = 2^N clk_in periods, 50 % duty.
module clk_div_jk #(
  parameter int unsigned N = 18
) (
  input  logic         clk_in,
  input  logic         rst,
  output logic         clk_out,
  output logic [N-1:0] q
);
  logic [N-1:0] q_n;

  for (genvar i = 0; i < N; i++) begin : g_stage
    if (i == 0) begin : g_first
      jk_ff u_ff (.clk(clk_in), .rst(rst), .j(1'b1), .k(1'b1), .q(q[i]), .q_n(q_n[i]));
    end else begin : g_next
      jk_ff u_ff (.clk(q_n[i-1]), .rst(rst), .j(1'b1), .k(1'b1), .q(q[i]), .q_n(q_n[i]));
    end
  end

  assign clk_out = q[N-1];
endmodule
