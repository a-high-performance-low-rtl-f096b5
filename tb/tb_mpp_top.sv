`timescale 1ps/10fs
// tb_mpp_top: end-to-end run of the whole design at its default sizes.
//
// 8x8 mesochronous multiplier, 350 ps clock, four bursts of operands, the
// clock stopped between bursts while the clock-path trims are retuned
// (codes 111, 001, 011 and a mixed set). Every product is checked: the n-th
// rising edge leaving the clock path must carry the product of the operands
// captured on the n-th rising edge entering it, whatever the path delay.
// Counted mechanisms, each must occur:
//   products      one product per clock, all bursts
//   staggered     rank clocks not simultaneous (clk_out edge later than
//                 clk_in edge)
//   in_flight_2   two clock edges, hence two operand sets, inside the
//                 4-stage path at once (path longer than a period)
//   retunes       clock-path trim changes between bursts
// 4x4 test chip, at the same time: reset, slow load of 16 operand pairs,
// at-speed pass at S1S0 = 11 and then at 00 (clock switch), slow read-back,
// and one full period of the divided monitor clock (2^18 system clocks).
module tb_mpp_top;
  localparam real T8 = 350.0;

  logic              m8_clk_in = 1'b0;
  logic [3:0][2:0]   m8_dly_ctl;
  logic [7:0]        m8_x, m8_y;
  logic [15:0]       m8_p, m8_p_n;
  logic              m8_clk_out;
  logic t_rst, t_s1, t_s0, t_wr_clk = 1'b0, t_wr_en, t_run, t_busy, t_clk_mon, t_clk_sys;
  logic [3:0] t_wr_addr, t_rd_addr, t_wr_x, t_wr_y;
  logic [7:0] t_rd_prod;

  mpp_top dut (.*);

  int checks = 0, failures = 0;
  int n_products = 0, n_staggered = 0, n_in_flight_2 = 0, n_retunes = 0;
  int n_t_products = 0, n_t_modes = 0, n_t_mon = 0;

  initial begin
    #3000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------- 8x8 side
  bit   clk_run = 1'b0;
  always begin
    #(T8/2);
    if (clk_run || m8_clk_in) m8_clk_in = ~m8_clk_in;
  end

  logic [15:0] exp_q [$];
  int n_in = 0, n_out = 0;
  realtime t_last_in;

  always @(posedge m8_clk_in) begin
    exp_q.push_back(16'(m8_x) * 16'(m8_y));
    n_in++;
    t_last_in = $realtime;
    if (n_in - n_out >= 2) n_in_flight_2++;
  end

  always @(negedge m8_clk_in) begin
    m8_x = 8'($urandom);
    m8_y = 8'($urandom);
  end

  always @(posedge m8_clk_out) begin
    logic [15:0] e;
    if ($realtime > t_last_in) n_staggered++;
    n_out++;
    #1;
    e = exp_q.pop_front();
    checks++;
    if (m8_p !== e || m8_p_n !== ~e) begin
      failures++;
      $display("FAIL 8x8 product %0d: %0d expected %0d", n_out, m8_p, e);
    end else n_products++;
  end

  task automatic burst(input logic [3:0][2:0] ctl, input int n);
    m8_dly_ctl = ctl;
    n_retunes++;
    clk_run = 1'b1;
    repeat (n) @(posedge m8_clk_in);
    clk_run = 1'b0;
    wait (m8_clk_in == 1'b0);
    #(2000);                    // let the last edges leave the path
    checks++;
    if (n_in != n_out) begin
      failures++;
      $display("FAIL %0d edges in, %0d out", n_in, n_out);
    end
  endtask

  bit done8 = 1'b0;
  initial begin
    m8_x = '0; m8_y = '0;
    m8_dly_ctl = {4{3'b111}};
    #1000;
    burst({4{3'b111}}, 500);
    burst({4{3'b001}}, 500);
    burst({4{3'b011}}, 500);
    burst({3'b001, 3'b111, 3'b011, 3'b001}, 500);
    done8 = 1'b1;
  end

  // ------------------------------------------------------- 4x4 chip side
  always #50000 t_wr_clk = ~t_wr_clk;
  logic [7:0] tmodel [16];
  bit donet = 1'b0;

  task automatic t_pass(input logic [1:0] sel);
    int bc;
    {t_s1, t_s0} = sel;
    repeat (4) @(posedge t_clk_sys);
    n_t_modes++;
    fork
      begin
        @(negedge t_wr_clk); t_run = 1'b1;
        @(negedge t_wr_clk); t_run = 1'b0;
      end
      begin
        wait (t_busy);
        bc = 1;
        forever begin
          @(posedge t_clk_sys); #1;
          if (!t_busy) break;
          bc++;
        end
      end
    join
    checks++;
    if (bc != 16) begin
      failures++;
      $display("FAIL chip pass took %0d clocks", bc);
    end
    repeat (5) @(posedge t_clk_sys);
    for (int a = 0; a < 16; a++) begin
      @(negedge t_wr_clk);
      t_rd_addr = 4'(a);
      #10;
      checks++;
      if (t_rd_prod !== tmodel[a]) begin
        failures++;
        $display("FAIL chip product %0d: %0d expected %0d", a, t_rd_prod, tmodel[a]);
      end else n_t_products++;
    end
  endtask

  initial begin
    realtime m0, m1;
    t_rst = 1'b0; t_run = 1'b0; t_wr_en = 1'b0; t_wr_addr = '0; t_wr_x = '0; t_wr_y = '0;
    t_rd_addr = '0; {t_s1, t_s0} = 2'b11;
    #100 t_rst = 1'b1;
    #10000 t_rst = 1'b0;
    for (int a = 0; a < 16; a++) begin
      @(negedge t_wr_clk);
      t_wr_en = 1'b1; t_wr_addr = 4'(a); t_wr_x = 4'($urandom); t_wr_y = 4'($urandom);
      tmodel[a] = 8'(t_wr_x) * 8'(t_wr_y);
    end
    @(negedge t_wr_clk); t_wr_en = 1'b0;
    t_pass(2'b11);
    t_pass(2'b00);
    {t_s1, t_s0} = 2'b11;
    repeat (2) @(posedge t_clk_sys);
    @(posedge t_clk_mon); m0 = $realtime;
    @(posedge t_clk_mon); m1 = $realtime;
    checks++;
    if (m1 - m0 < 1950.0*262144 - 1.0 || m1 - m0 > 1950.0*262144 + 1.0) begin
      failures++;
      $display("FAIL monitor period %0.1f", m1 - m0);
    end else n_t_mon++;
    donet = 1'b1;
  end

  // ---------------------------------------------------------------- end
  initial begin
    wait (done8 && donet);
    $display("mechanisms: products=%0d staggered=%0d in_flight_2=%0d retunes=%0d chip_products=%0d chip_clock_modes=%0d monitor_periods=%0d",
             n_products, n_staggered, n_in_flight_2, n_retunes, n_t_products, n_t_modes, n_t_mon);
    checks++; if (n_products == 0)    begin failures++; $display("FAIL no 8x8 product"); end
    checks++; if (n_staggered == 0)   begin failures++; $display("FAIL ranks never staggered"); end
    checks++; if (n_in_flight_2 == 0) begin failures++; $display("FAIL never two edges in flight"); end
    checks++; if (n_retunes < 2)      begin failures++; $display("FAIL no retune"); end
    checks++; if (n_t_products == 0)  begin failures++; $display("FAIL no chip product"); end
    checks++; if (n_t_modes < 2)      begin failures++; $display("FAIL no clock switch"); end
    checks++; if (n_t_mon == 0)       begin failures++; $display("FAIL no monitor period"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
