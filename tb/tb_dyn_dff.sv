`timescale 1ps/10fs
// tb_dyn_dff: the dynamic two-phase flip-flop behaves as a positive-edge D
// flip-flop: q takes d at the rising edge, ignores d while the clock is high
// (master closed) and while it is low (slave closed).
module tb_dyn_dff;
  logic clk = 1'b0, d, q, exp_q;
  int checks = 0, failures = 0;

  dyn_dff dut (.clk_reg(clk), .d(d), .q(q));

  always #250 clk = ~clk;   // 500 ps clock

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what);
    checks++;
    if (q !== exp_q) begin
      failures++;
      $display("FAIL %s: q=%0b expected %0b at %0t", what, q, exp_q, $time);
    end
  endtask

  initial begin
    d = 1'b0;
    @(posedge clk); #10;
    exp_q = 1'b0;
    repeat (200) begin
      @(negedge clk); #10;
      d = 1'($urandom);
      #100;
      check("clock low, d changed");
      d = 1'($urandom);
      #50;
      check("clock low, d changed again");
      @(posedge clk); #10;
      exp_q = d;
      check("after rising edge");
      d = ~d;
      #100;
      check("clock high, d changed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
