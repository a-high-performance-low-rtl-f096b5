`timescale 1ps/10fs
// clk_delay_element: behavioural model of one clock-path delay element
// (Delta_S of a stage). Not synthesizable: in silicon it is a chain of
// inverters; here it is a pure time delay.
//
// The clock reaching register rank i+1 has to trail the clock of rank i by
// the flight time of the data through stage i,
//   Delta_S(i) = dmax(i) + DR + ts + dclk = N(i)*Tclk + delta(i).
// Because the clock is periodic only delta(i) has to be built: the element
// delays each clock edge by DELTA_PS, and the N(i) whole periods come for
// free (a rank then takes the edge N(i) periods "later" than the edge that
// launched its data). N is carried as a parameter for documentation and for
// the testbenches' bookkeeping only.
//
// Rising and falling edges are delayed separately, so the model is exact as
// long as DELTA_PS is shorter than one clock period (true by construction:
// delta(i) < Tclk).
// Ports: clk_in, clk_out.
module clk_delay_element #(
  parameter real         DELTA_PS = 35.0,
  parameter int unsigned N        = 4
) (
  input  logic clk_in,
  output logic clk_out
);
  initial clk_out = 1'b0;

  always begin
    @(posedge clk_in);
    #(DELTA_PS);
    clk_out = 1'b1;
  end

  always begin
    @(negedge clk_in);
    #(DELTA_PS);
    clk_out = 1'b0;
  end

  initial begin
    assert (DELTA_PS >= 0.0) else $error("negative delay");
    if (N > 8) $warning("large N narrows the allowed clock-period window");
  end
endmodule
