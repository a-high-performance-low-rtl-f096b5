`timescale 1ps/10fs
// tb_var_delay_element: the delay from clk_in to clk_out for the three
// characterised control codes (C1 C2 C3 = 001, 011, 111 give 139.94,
// 110.81 and 96.03 ps) and the model's rule for the other codes (same delay
// as the characterised code with as many inputs set; 000 as 001).
module tb_var_delay_element;
  logic clk = 1'b0, out, c1, c2, c3;
  int checks = 0, failures = 0;
  realtime t_in;

  var_delay_element dut (.c1(c1), .c2(c2), .c3(c3), .clk_in(clk), .clk_out(out));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real expected(input logic [2:0] c);
    case (c)
      3'b001, 3'b000, 3'b010, 3'b100: return 139.94;
      3'b011, 3'b101, 3'b110:         return 110.81;
      default:                        return 96.03;
    endcase
  endfunction

  initial begin
    {c1, c2, c3} = 3'b001;
    #1000;
    for (int rep = 0; rep < 4; rep++) begin
      for (int c = 0; c < 8; c++) begin
        {c1, c2, c3} = 3'(c);
        #500;
        clk = 1'b1; t_in = $realtime;
        @(posedge out);
        checks++;
        if ($realtime - t_in < expected(3'(c)) - 0.01 || $realtime - t_in > expected(3'(c)) + 0.01) begin
          failures++;
          $display("FAIL code %03b rise delay %0.2f", c, $realtime - t_in);
        end
        #500;
        clk = 1'b0; t_in = $realtime;
        @(negedge out);
        checks++;
        if ($realtime - t_in < expected(3'(c)) - 0.01 || $realtime - t_in > expected(3'(c)) + 0.01) begin
          failures++;
          $display("FAIL code %03b fall delay %0.2f", c, $realtime - t_in);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
