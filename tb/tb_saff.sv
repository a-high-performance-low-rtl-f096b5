`timescale 1ps/10fs
// tb_saff: the sense-amplifier flip-flop captures a complementary input pair
// on the rising clock edge only, holds it through the rest of the period and
// keeps its state when the input pair is not complementary.
module tb_saff;
  logic clk = 1'b0, d, d_n, q, q_n;
  logic exp_q;
  int checks = 0, failures = 0;

  saff dut (.clk(clk), .d(d), .d_n(d_n), .q(q), .q_n(q_n));

  always #175 clk = ~clk;   // 350 ps clock

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic e, input string what);
    checks++;
    if (q !== e || q_n !== ~e) begin
      failures++;
      $display("FAIL %s: q=%0b q_n=%0b expected %0b", what, q, q_n, e);
    end
  endtask

  initial begin
    d = 1'b0; d_n = 1'b1;
    @(posedge clk); #20;
    exp_q = 1'b0;
    repeat (200) begin
      @(negedge clk);
      d = 1'($urandom); d_n = ~d;
      #100;                        // still before the rising edge
      check(exp_q, "before edge");
      @(posedge clk); #20;
      exp_q = d;
      check(exp_q, "after edge");
      d = ~d; d_n = ~d;            // input changes while the clock is high
      #50;
      check(exp_q, "input change after edge");
    end
    // non-complementary input: state is kept
    @(negedge clk); d = 1'b1; d_n = 1'b1;
    @(posedge clk); #20;
    check(exp_q, "non-complementary 11");
    @(negedge clk); d = 1'b0; d_n = 1'b0;
    @(posedge clk); #20;
    check(exp_q, "non-complementary 00");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
