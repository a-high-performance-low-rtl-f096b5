`timescale 1ps/10fs
// tb_clk_div_jk: the JK ripple chain counts input clocks in binary and its
// last stage has a period of 2^N input periods with a 50 % duty cycle;
// checked for N = 4 (counter value every clock) and the default N = 18.
module tb_clk_div_jk;
  logic clk = 1'b0, rst;
  logic o4, o18;
  logic [3:0]  q4;
  logic [17:0] q18;
  int checks = 0, failures = 0;

  clk_div_jk #(.N(4)) dut4 (.clk_in(clk), .rst(rst), .clk_out(o4), .q(q4));
  clk_div_jk          dut18 (.clk_in(clk), .rst(rst), .clk_out(o18), .q(q18));

  always #975 clk = ~clk;   // 1.95 ns

  initial begin
    #2000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n = 0;
  initial begin
    realtime t_rise [$];
    realtime t_fall;
    rst = 1'b0;
    #100 rst = 1'b1;       // asynchronous reset acts on its rising edge
    #3000;
    @(negedge clk); rst = 1'b0;
    // counter value after each rising edge (ripple settles within the period)
    repeat (40) begin
      @(posedge clk); n++;
      #900;
      checks++;
      if (q4 !== 4'(n) || q18[3:0] !== 4'(n)) begin
        failures++;
        $display("FAIL count after %0d clocks: q4=%0d q18=%0d", n, q4, q18);
      end
    end
    // period of the N=18 output: two rising edges
    @(posedge o18); t_rise.push_back($realtime);
    @(negedge o18); t_fall = $realtime;
    @(posedge o18); t_rise.push_back($realtime);
    checks++;
    if (t_rise[1] - t_rise[0] < 1950.0*262144 - 0.1 || t_rise[1] - t_rise[0] > 1950.0*262144 + 0.1) begin
      failures++;
      $display("FAIL 2^18 period %0.1f", t_rise[1] - t_rise[0]);
    end
    checks++;
    if (t_fall - t_rise[0] < 1950.0*131072 - 0.1 || t_fall - t_rise[0] > 1950.0*131072 + 0.1) begin
      failures++;
      $display("FAIL 2^18 high time %0.1f", t_fall - t_rise[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
