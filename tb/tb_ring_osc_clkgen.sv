`timescale 1ps/10fs
// tb_ring_osc_clkgen: the four periods selected by S1, S0 (1.95, 2.22,
// 2.51 and 2.88 ns) and the switch between them.
module tb_ring_osc_clkgen;
  logic s1, s0, clock;
  int checks = 0, failures = 0;

  ring_osc_clkgen dut (.s1(s1), .s0(s0), .clock(clock));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t0, t1;
    realtime exp_p [4] = '{2880.0, 2510.0, 2220.0, 1950.0};  // index {S1,S0}
    for (int rep = 0; rep < 3; rep++) begin
      for (int s = 3; s >= 0; s--) begin
        {s1, s0} = 2'(s);
        repeat (3) @(posedge clock);   // settle after the switch
        repeat (10) begin
          @(posedge clock); t0 = $realtime;
          @(posedge clock); t1 = $realtime;
          checks++;
          if (t1 - t0 < exp_p[s] - 0.01 || t1 - t0 > exp_p[s] + 0.01) begin
            failures++;
            $display("FAIL S1S0=%02b period %0.2f expected %0.2f", s, t1 - t0, exp_p[s]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
