`timescale 1ps/10fs
// tb_tiny_chip: the 4x4 test chip used the way a slow tester uses it.
//   1. reset, then load all 16 operand pairs into the input bank through the
//      slow write port (100 ns write clock);
//   2. for each oscillator setting S1,S0 (11, 10, 01, 00): check the system
//      clock period, pulse run, wait for the at-speed pass, and read all 16
//      products back through the slow read port;
//   3. reload new operands between passes;
//   4. check that the monitor pin toggles at 2^18 system clocks (1.04 ms
//      on the fabricated copy).
// The at-speed pass must take DEPTH system clocks (one operand per clock).
// A second copy of the chip, cfab, carries the delays measured on the
// fabricated part (clock periods 3.97, 4.62, 5.11 and 5.95 ns; stage delays
// 5.84 and 6.76 ns, i.e. clock-path delays 1.87 and 2.79 ns with N = 1). It
// shares every input pin with the first copy and is checked the same way
// after each of its own passes; both copies get the same run pulses.
module tb_tiny_chip;
  localparam int unsigned D = 16;
  logic rst, s1, s0, wr_clk = 1'b0, wr_en, run, busy, clk_mon, clk_sys;
  logic [3:0] wr_addr, rd_addr, wr_x, wr_y;
  logic [7:0] rd_prod;
  logic [7:0] model [D];
  int checks = 0, failures = 0;
  int passes = 0, loads = 0;

  tiny_chip dut (.rst(rst), .s1(s1), .s0(s0), .wr_clk(wr_clk), .wr_en(wr_en), .wr_addr(wr_addr),
                 .wr_x(wr_x), .wr_y(wr_y), .run(run), .busy(busy), .rd_addr(rd_addr),
                 .rd_prod(rd_prod), .clk_mon(clk_mon), .clk_sys(clk_sys));

  logic busy_f, clk_mon_f, clk_sys_f;
  logic [7:0] rd_prod_f;
  tiny_chip #(.DELTA_PS('{1870.0, 2790.0}), .N('{1, 1}),
              .T11_PS(3970.0), .T10_PS(4620.0), .T01_PS(5110.0), .T00_PS(5950.0)) cfab (
    .rst(rst), .s1(s1), .s0(s0), .wr_clk(wr_clk), .wr_en(wr_en), .wr_addr(wr_addr),
    .wr_x(wr_x), .wr_y(wr_y), .run(run), .busy(busy_f), .rd_addr(rd_addr),
    .rd_prod(rd_prod_f), .clk_mon(clk_mon_f), .clk_sys(clk_sys_f));

  always #50000 wr_clk = ~wr_clk;

  initial begin
    #3000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input int seed);
    for (int a = 0; a < D; a++) begin
      @(negedge wr_clk);
      wr_en = 1'b1; wr_addr = 4'(a);
      if (seed == 0) begin wr_x = 4'(a); wr_y = 4'(15 - a); end
      else begin wr_x = 4'($urandom); wr_y = 4'($urandom); end
      model[a] = 8'(wr_x) * 8'(wr_y);
    end
    @(negedge wr_clk); wr_en = 1'b0;
    loads++;
  endtask

  task automatic clk_period(input logic [1:0] sel, input real period, input logic fab);
    realtime t0, t1;
    if (fab) begin
      @(posedge clk_sys_f); t0 = $realtime;
      @(posedge clk_sys_f); t1 = $realtime;
    end else begin
      @(posedge clk_sys); t0 = $realtime;
      @(posedge clk_sys); t1 = $realtime;
    end
    checks++;
    if (t1 - t0 < period - 0.01 || t1 - t0 > period + 0.01) begin
      failures++;
      $display("FAIL %s S1S0=%02b system clock period %0.2f expected %0.2f",
               fab ? "fabricated" : "simulated", sel, t1 - t0, period);
    end
  endtask

  task automatic at_speed(input logic [1:0] sel, input real period, input real period_f);
    int busy_clocks, busy_clocks_f;
    {s1, s0} = sel;
    repeat (3) @(posedge clk_sys_f);
    clk_period(sel, period, 1'b0);
    clk_period(sel, period_f, 1'b1);
    // the pass (16 clocks, ~31 ns) is over long before the slow run pulse
    // ends, so watch busy while the pulse is being driven
    fork
      begin
        @(negedge wr_clk); run = 1'b1;
        @(negedge wr_clk); run = 1'b0;
      end
      begin
        wait (busy);
        busy_clocks = 1;
        forever begin
          @(posedge clk_sys);
          #1;
          if (!busy) break;
          busy_clocks++;
        end
      end
      begin
        wait (busy_f);
        busy_clocks_f = 1;
        forever begin
          @(posedge clk_sys_f);
          #1;
          if (!busy_f) break;
          busy_clocks_f++;
        end
      end
    join
    checks += 2;
    if (busy_clocks != D || busy_clocks_f != D) begin
      failures++;
      $display("FAIL at-speed pass took %0d / %0d clocks, expected %0d", busy_clocks, busy_clocks_f, D);
    end
    repeat (5) @(posedge clk_sys_f);
    for (int a = 0; a < D; a++) begin
      @(negedge wr_clk);
      rd_addr = 4'(a);
      #10;
      checks++;
      if (rd_prod !== model[a]) begin
        failures++;
        $display("FAIL S1S0=%02b product %0d: %0d expected %0d", sel, a, rd_prod, model[a]);
      end
      checks++;
      if (rd_prod_f !== model[a]) begin
        failures++;
        $display("FAIL fabricated S1S0=%02b product %0d: %0d expected %0d", sel, a, rd_prod_f, model[a]);
      end
    end
    passes++;
  endtask

  initial begin
    realtime m0, m1;
    rst = 1'b0; run = 1'b0; wr_en = 1'b0; wr_addr = '0; wr_x = '0; wr_y = '0; rd_addr = '0;
    {s1, s0} = 2'b11;
    #100 rst = 1'b1;
    #10000 rst = 1'b0;
    load(0);
    at_speed(2'b11, 1950.0, 3970.0);
    load(1);
    at_speed(2'b10, 2220.0, 4620.0);
    load(2);
    at_speed(2'b01, 2510.0, 5110.0);
    load(3);
    at_speed(2'b00, 2880.0, 5950.0);
    // monitor pin: one period = 2^18 system clocks (S1S0 = 11)
    {s1, s0} = 2'b11;
    @(posedge clk_mon); m0 = $realtime;
    @(posedge clk_mon); m1 = $realtime;
    checks++;
    if (m1 - m0 < 1950.0*262144 - 1.0 || m1 - m0 > 1950.0*262144 + 1.0) begin
      failures++;
      $display("FAIL monitor period %0.1f ps", m1 - m0);
    end
    @(posedge clk_mon_f); m0 = $realtime;
    @(posedge clk_mon_f); m1 = $realtime;
    checks++;
    if (m1 - m0 < 3970.0*262144 - 1.0 || m1 - m0 > 3970.0*262144 + 1.0) begin
      failures++;
      $display("FAIL fabricated monitor period %0.1f ps", m1 - m0);
    end
    checks++;
    if (passes != 4 || loads != 4) begin
      failures++;
      $display("FAIL passes=%0d loads=%0d", passes, loads);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
