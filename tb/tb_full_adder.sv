`timescale 1ps/10fs
// tb_full_adder: exhaustive check of the differential full adder. All eight
// input combinations are applied with complementary rails; sum and carry
// are compared with the arithmetic sum a+b+ci, and each complement output
// must be the inverse of its true output. The half-adder use (ci = 0) is
// covered by the same cases.
module tb_full_adder;
  logic a, b, ci, s, s_n, co, co_n;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .a_n(~a), .b(b), .b_n(~b), .ci(ci), .ci_n(~ci),
                  .s(s), .s_n(s_n), .co(co), .co_n(co_n));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, ci} = 3'(v);
      #10;
      checks++;
      if ({co, s} != 2'(32'(a) + 32'(b) + 32'(ci))) begin
        failures++;
        $display("FAIL a=%0b b=%0b ci=%0b -> co=%0b s=%0b", a, b, ci, co, s);
      end
      checks++;
      if (s_n != ~s || co_n != ~co) begin
        failures++;
        $display("FAIL complement rails a=%0b b=%0b ci=%0b", a, b, ci);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
