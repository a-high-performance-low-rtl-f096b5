`timescale 1ps/10fs
// tb_clk_delay_element: each rising and falling edge of a 350 ps clock
// leaves the element exactly delta later, and the output keeps the input's
// period; checked for delta = 35 ps (the 8x8 default) and for a delta longer
// than half a period (1350 ps on a 1950 ps clock).
module tb_clk_delay_element;
  logic clk_a = 1'b0, clk_b = 1'b0, out_a, out_b;
  int checks = 0, failures = 0;
  realtime last_out_a;

  clk_delay_element #(.DELTA_PS(35.0), .N(4))   dut_a (.clk_in(clk_a), .clk_out(out_a));
  clk_delay_element #(.DELTA_PS(1350.0), .N(1)) dut_b (.clk_in(clk_b), .clk_out(out_b));

  always #175 clk_a = ~clk_a;
  always #975 clk_b = ~clk_b;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input realtime got, input realtime exp, input string what);
    checks++;
    if (got < exp - 0.01 || got > exp + 0.01) begin
      failures++;
      $display("FAIL %s: %0.2f ps expected %0.2f ps", what, got, exp);
    end
  endtask


  int na = 0;
  // input edges fall on multiples of 175 ps, so an output edge must sit
  // 35 ps after one
  always @(posedge out_a or negedge out_a) if ($realtime > 0) begin
    chk($realtime - 175.0 * $floor(($realtime - 35.0 + 0.005) / 175.0), 35.0, "delta 35 edge delay");
    if (out_a && last_out_a > 0.0) chk($realtime - last_out_a, 350.0, "output period");
    if (out_a) last_out_a = $realtime;
    na++;
  end

  int nb = 0;
  // input edges every 975 ps; 1350 ps = 975 + 375
  always @(posedge out_b or negedge out_b) if ($realtime > 0) begin
    chk($realtime - 975.0 * $floor(($realtime - 375.0 + 0.005) / 975.0), 375.0, "delta 1350 edge delay (mod 975)");
    nb++;
  end

  initial begin
    wait (na >= 400 && nb >= 40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
