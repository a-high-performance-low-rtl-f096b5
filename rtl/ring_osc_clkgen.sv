`timescale 1ps/10fs
// ring_osc_clkgen: behavioural model of the test chip's on-chip clock
// generator. Not synthesizable: it is an analog ring oscillator.
//
// In silicon a chain of inverters is tapped at four points; a 4:1
// multiplexer selected by S1, S0 closes the ring through two more
// inverters, so the loop holds 3, 5, 7 or 9 inversions and oscillates at
// one of four periods. This model reproduces the four characterised
// periods:
//   S1 S0 = 1 1 : 1.95 ns (513 MHz)     1 0 : 2.22 ns (450 MHz)
//           0 1 : 2.51 ns (400 MHz)     0 0 : 2.88 ns (347 MHz)
// A change of S1, S0 takes effect at the next clock transition. The clock
// starts low at time 0 (the real ring starts from noise).
// Ports: s1, s0 in; clock out (50 % duty cycle).
module ring_osc_clkgen #(
  parameter real T11_PS = 1950.0,
  parameter real T10_PS = 2220.0,
  parameter real T01_PS = 2510.0,
  parameter real T00_PS = 2880.0
) (
  input  logic s1, s0,
  output logic clock
);
  real half_ps;

  always_comb begin
    unique case ({s1, s0})
      2'b11:   half_ps = T11_PS / 2.0;
      2'b10:   half_ps = T10_PS / 2.0;
      2'b01:   half_ps = T01_PS / 2.0;
      default: half_ps = T00_PS / 2.0;
    endcase
  end

  initial begin
    clock = 1'b0;
    forever begin
      #(half_ps);
      clock = ~clock;
    end
  end
endmodule
