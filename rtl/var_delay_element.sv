`timescale 1ps/10fs
// var_delay_element: behavioural model of the digitally variable delay
// element for the clock path. Not synthesizable: the silicon cell is an
// inverter stage whose load or drive is switched by control inputs.
//
// Process or temperature drift can move a stage's dmin/dmax so that the
// clock edges no longer straddle the data window. The clock period and the
// clock-path delays are then retuned; this element lets the delay be set
// digitally by C1, C2, C3. The three characterised settings are
//   C1 C2 C3 = 0 0 1 : 139.94 ps
//              0 1 1 : 110.81 ps
//              1 1 1 :  96.03 ps
// i.e. each extra control input that is set shortens the delay. The other
// five codes were not characterised; this model gives them the delay of the
// characterised code with the same number of inputs set, and treats 000 like
// 001 (own choice).
// Edges are delayed separately, exact while the delay is below the clock
// period. Ports: c1, c2, c3, clk_in, clk_out.
module var_delay_element #(
  parameter real D1_PS = 139.94,  // one control input set
  parameter real D2_PS = 110.81,  // two set
  parameter real D3_PS = 96.03    // three set
) (
  input  logic c1, c2, c3,
  input  logic clk_in,
  output logic clk_out
);
  real d_ps;

  always_comb begin
    unique case (32'(c1) + 32'(c2) + 32'(c3))
      0, 1:    d_ps = D1_PS;
      2:       d_ps = D2_PS;
      default: d_ps = D3_PS;
    endcase
  end

  initial clk_out = 1'b0;

  always begin
    @(posedge clk_in);
    #(d_ps);
    clk_out = 1'b1;
  end

  always begin
    @(negedge clk_in);
    #(d_ps);
    clk_out = 1'b0;
  end
endmodule
