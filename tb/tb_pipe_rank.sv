`timescale 1ps/10fs
// tb_pipe_rank: a register rank built from either flip-flop cell captures a
// whole dual-rail word on the rising edge of its own clock and holds it for
// the rest of the period.
module tb_pipe_rank;
  import mpp_pkg::*;
  localparam int unsigned W = 24;
  logic clk = 1'b0;
  logic [W-1:0] d, qs_t, qs_f, qd_t, qd_f, exp_q;
  int checks = 0, failures = 0;

  pipe_rank #(.W(W), .FF(FF_SAFF)) dut_s (.clk(clk), .d_t(d), .d_f(~d), .q_t(qs_t), .q_f(qs_f));
  pipe_rank #(.W(W), .FF(FF_DYN))  dut_d (.clk(clk), .d_t(d), .d_f(~d), .q_t(qd_t), .q_f(qd_f));

  always #175 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what);
    checks++;
    if (qs_t !== exp_q || qs_f !== ~exp_q || qd_t !== exp_q || qd_f !== ~exp_q) begin
      failures++;
      $display("FAIL %s: saff %h/%h dyn %h/%h expected %h", what, qs_t, qs_f, qd_t, qd_f, exp_q);
    end
  endtask

  initial begin
    d = '0;
    @(posedge clk); #20;
    exp_q = '0;
    repeat (300) begin
      @(negedge clk);
      d = W'($urandom);
      #50;
      check("before edge");
      @(posedge clk); #20;
      exp_q = d;
      check("after edge");
      d = W'($urandom);
      #50;
      check("held while clock high");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
